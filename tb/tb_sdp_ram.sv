// tb_sdp_ram: self-checking testbench for sdp_ram (WIDTH 72, DEPTH 40).
// Random writes and reads on both ports in the same cycles are checked
// against a model array: a read returns the word one cycle later, the old
// word when the same address is written in the same cycle, and the output
// holds while no read is requested.
`timescale 1ns/1ps
module tb_sdp_ram;
  localparam int W = 72, D = 40, AW = 6;

  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, model [D], expect_q;
  logic expect_valid = 0;
  int checks = 0, failures = 0, collisions = 0;

  always #5 clk = ~clk;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {8'(i), $urandom, $urandom}; model[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (expect_valid) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++; $display("read %h expected %h", rdata, expect_q);
        end
      end
      we    = $urandom_range(0, 1);
      re    = $urandom_range(0, 2) != 0;
      waddr = AW'($urandom_range(0, D - 1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, D - 1));
      wdata = {$urandom, $urandom, 8'($urandom)};
      if (re) begin
        expect_q = model[raddr];
        if (we && waddr == raddr) collisions++;
      end
      if (re) expect_valid = 1;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no read-during-write seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
