// tlc1549_model -- behavioural model of the TLC1549 10-bit serial ADC, for
// simulation only (not synthesizable, no analog content).
//
// CS falling presents the MSB of the previous result on dout; each falling
// I/O clock edge presents the next bit. The tenth falling edge samples the
// input value `analog` as the new result (appended to `history`) and starts
// the conversion. The model counts timing violations: CS falling before
// CONV_NS has passed since the last conversion start, or the first rising
// I/O clock edge less than SETUP_NS after CS falling.
`timescale 1ns/1ps
module tlc1549_model #(
  parameter real CONV_NS  = 21000.0,
  parameter real SETUP_NS = 1425.0
) (
  input  logic       cs_n,
  input  logic       io_clk,
  output logic       dout,
  input  logic [9:0] analog
);
  logic [9:0] result = '0;
  logic [9:0] sh = '0;
  int         cnt = 0;
  realtime    t_cs = 0.0, t_conv = -1.0e9;
  int         violations = 0;
  logic [9:0] history [$];

  initial dout = 1'b0;

  always @(negedge cs_n) begin
    if ($realtime - t_conv < CONV_NS) begin
      violations++;
      $display("tlc1549_model: CS fell %0t ns into the conversion", $realtime - t_conv);
    end
    sh   = result;
    dout = sh[9];
    cnt  = 0;
    t_cs = $realtime;
  end

  always @(posedge io_clk) begin
    if (!cs_n && cnt == 0 && ($realtime - t_cs < SETUP_NS)) begin
      violations++;
      $display("tlc1549_model: I/O clock %0t ns after CS", $realtime - t_cs);
    end
  end

  always @(negedge io_clk) begin
    if (!cs_n) begin
      cnt++;
      if (cnt < 10) begin
        sh   = {sh[8:0], 1'b0};
        dout = sh[9];
      end else if (cnt == 10) begin
        result = analog;
        history.push_back(analog);
        t_conv = $realtime;
      end
    end
  end
endmodule
