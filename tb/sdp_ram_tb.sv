// sdp_ram_tb -- self-checking test of the one-write, two-read block RAM.
// Fills a 64-word RAM with random words, reads every address on both ports
// (one-cycle latency) and checks read-after-write in the following cycle.
`timescale 1ns/1ps
module sdp_ram_tb;
  localparam int W = 16, D = 64;
  logic clk = 0;
  logic we = 0;
  logic [5:0] waddr = 0, raddr0 = 0, raddr1 = 0;
  logic [W-1:0] wdata = 0, rdata0, rdata1;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 6'(i); wdata = W'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < D; i++) begin
      raddr0 = 6'(i); raddr1 = 6'(D - 1 - i);
      @(negedge clk);
      chk(rdata0, model[i], "port0");
      chk(rdata1, model[D-1-i], "port1");
    end
    // write then read the same word in the next cycle on both ports
    for (int k = 0; k < 20; k++) begin
      we = 1; waddr = 6'($urandom_range(D-1)); wdata = W'($urandom);
      model[waddr] = wdata;
      @(negedge clk);
      we = 0; raddr0 = waddr; raddr1 = waddr;
      @(negedge clk);
      chk(rdata0, model[raddr0], "raw port0");
      chk(rdata1, model[raddr1], "raw port1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
