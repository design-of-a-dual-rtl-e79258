// pingpong_buffer_tb -- checks the RAMA/RAMB double buffer: bank hand-over
// when a bank fills, read-back of both banks through both read ports,
// dropping of samples (overrun) when both banks are full, and continued
// operation after each release.
`timescale 1ns/1ps
module pingpong_buffer_tb;
  import holter_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, overrun, rd_valid, rd_release = 0;
  adc_word_t wr_data = 0, rd_data0, rd_data1;
  logic [3:0] rd_addr0 = 0, rd_addr1 = 0;
  int checks = 0, failures = 0, ovr_count = 0;
  adc_word_t sent [$];

  pingpong_buffer #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  task automatic write_n(input int cnt);
    for (int i = 0; i < cnt; i++) begin
      wr_en = 1; wr_data = 10'($urandom);
      #1;
      if (!overrun) sent.push_back(wr_data);
      else          ovr_count++;
      @(posedge clk); #1;
    end
    wr_en = 0;
  endtask

  task automatic read_bank();
    adc_word_t e;
    for (int i = 0; i < D; i++) begin
      rd_addr0 = 4'(i); rd_addr1 = 4'(D - 1 - i);
      @(posedge clk); #1;
      chk(rd_data0 === sent[i], $sformatf("port0 word %0d", i));
      chk(rd_data1 === sent[D - 1 - i], $sformatf("port1 word %0d", D - 1 - i));
    end
    repeat (D) e = sent.pop_front();
    rd_release = 1;
    @(posedge clk); #1;
    rd_release = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!rd_valid, "no bank ready after reset");
    write_n(D - 1);
    chk(!rd_valid, "bank not ready one sample early");
    write_n(1);
    chk(rd_valid, "bank A ready when full");
    write_n(D);                         // fills bank B while A is unread
    chk(rd_valid, "still ready");
    write_n(3);                         // both full: dropped
    chk(ovr_count == 3, "three samples dropped");
    read_bank();                        // A
    chk(rd_valid, "bank B ready after A released");
    write_n(5);                         // now goes to A
    chk(ovr_count == 3, "no drop after release");
    read_bank();                        // B
    chk(!rd_valid, "A not yet full");
    write_n(D - 5);
    chk(rd_valid, "A full again");
    read_bank();
    chk(!rd_valid, "all consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
