// sdp_ram -- block RAM with one write port and two synchronous read ports.
//
// Every buffer of the filter is one of these: the two input buffers that
// alternate (RAMA/RAMB), the four detail stores (RAM1-RAM4), the two work
// arrays for the approximation signal and the output frame. Two read ports
// let the wavelet step fetch x[n] and x[n -/+ 2^j] in the same cycle; on an
// FPGA this maps to a true dual-port block RAM (or two copies of a simple
// dual-port one).
//
// Timing: a write (we, waddr, wdata) takes effect at the clock edge. Each
// read port registers its address; rdata0/rdata1 show the word one cycle
// after the address was presented, and a read in the cycle after a write
// to the same address returns the new word. Contents are not reset.
module sdp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule
