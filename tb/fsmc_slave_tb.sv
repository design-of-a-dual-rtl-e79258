// fsmc_slave_tb -- drives the FSMC slave through the STM32 bus model.
// Checks the ID and default threshold registers, CTRL and threshold
// write/read-back, the frame-ready flag (set by the filter, cleared by ACK),
// the frame counter, the sticky overrun flag and its clear, reads of the
// frame window at random addresses, and that the FPGA drives the data bus
// only during reads.
`timescale 1ns/1ps
module fsmc_slave_tb;
  import holter_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic fsmc_ne, fsmc_noe, fsmc_nwe, fsmc_d_oe;
  logic [AW:0] fsmc_a;
  logic [15:0] fsmc_d_in, fsmc_d_out;
  logic enable, frame_done = 0, frame_ready, busy = 0, overrun = 0;
  thr_t thr [DEN_LEVELS];
  logic [AW-1:0] frame_raddr;
  sample_t frame_rdata;
  int checks = 0, failures = 0;

  fsmc_slave #(.AW(AW)) dut (.*);
  stm32_fsmc_model #(.AW1(AW + 1)) cpu (
    .ne(fsmc_ne), .noe(fsmc_noe), .nwe(fsmc_nwe), .a(fsmc_a),
    .d_to_fpga(fsmc_d_in), .d_from_fpga(fsmc_d_out), .d_oe(fsmc_d_oe));

  always #20 clk = ~clk;

  function automatic logic [15:0] pattern(input int adr);
    return 16'((adr * 2654435761) >> 7);
  endfunction

  always_ff @(posedge clk) frame_rdata <= sample_t'(pattern(int'(frame_raddr)));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    logic [15:0] r;
    int adr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cpu.read16(REG_ID, r);      chk(r == DESIGN_ID, $sformatf("ID %h", r));
    cpu.read16(REG_THR1, r);    chk(r == THR1_DEF, "THR1 default");
    cpu.read16(REG_THR3, r);    chk(r == THR3_DEF, "THR3 default");
    cpu.read16(REG_CTRL, r);    chk(r == 0 && !enable, "disabled after reset");
    cpu.write16(REG_CTRL, 16'h0001);
    repeat (3) @(posedge clk);  // the write lands within three FPGA clocks
    chk(enable, "enable set by CTRL write");
    cpu.read16(REG_CTRL, r);    chk(r == 1, "CTRL read-back");
    for (int k = 0; k < 4; k++) cpu.write16(REG_THR1 + k, 16'(100 + 11 * k));
    for (int k = 0; k < 4; k++) begin
      cpu.read16(REG_THR1 + k, r);
      chk(r == 16'(100 + 11 * k) && thr[k] == 16'(100 + 11 * k), $sformatf("THR%0d", k + 1));
    end
    cpu.read16(REG_STATUS, r);  chk(r == 0, $sformatf("STATUS idle %h", r));
    busy = 1;
    cpu.read16(REG_STATUS, r);  chk(r == 16'h0002, "STATUS busy");
    pulse(frame_done);
    busy = 0;
    cpu.read16(REG_STATUS, r);  chk(r == 16'h0001 && frame_ready, "frame ready");
    cpu.read16(REG_FRAMES, r);  chk(r == 1, "frame counter");
    pulse(overrun);
    cpu.read16(REG_STATUS, r);  chk(r == 16'h0005, "overrun flag");
    cpu.write16(REG_ACK, 16'h0001);
    cpu.read16(REG_STATUS, r);  chk(r == 16'h0004 && !frame_ready, "ACK clears frame ready only");
    cpu.write16(REG_ACK, 16'h0004);
    cpu.read16(REG_STATUS, r);  chk(r == 16'h0000, "overrun cleared");
    for (int k = 0; k < 40; k++) begin
      adr = (k < 2) ? k * (2**AW - 1) : int'($urandom_range(2**AW - 1));
      cpu.read16((1 << AW) | adr, r);
      chk(r == pattern(adr), $sformatf("frame word %0d: %h", adr, r));
    end
    // a write to the frame window must not disturb the registers
    cpu.write16((1 << AW) | REG_CTRL, 16'h0000);
    repeat (3) @(posedge clk);
    chk(enable, "frame-window write ignored");
    chk(cpu.contention == 0, "bus driven during a write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
