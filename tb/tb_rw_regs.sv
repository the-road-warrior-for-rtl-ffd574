// tb_rw_regs: self-checking test of the mode and status registers.
// Checks the reset values (filter on, XFT required, 4 silicon layers), random writes and
// read-back of the mode register and the decoded mode fields, the parity-error counter
// (counting, clearing by a write, holding at its maximum is not reached here) and the
// status bits.
`timescale 1ns / 1ps
module tb_rw_regs;
  import rw_pkg::*;

  logic clk = 0, rst_n = 0, bus_we = 0, parity_err = 0, am_full = 0, fifo_overflow = 0;
  logic [1:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  rw_mode_t mode;
  int checks = 0, failures = 0, cnt = 0;

  rw_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    bus_addr = 0;
    #1 check(bus_rdata == 32'h13 && mode.enable && mode.xft_req && mode.min_si == 4, "reset mode");
    for (int i = 0; i < 500; i++) begin
      logic [31:0] d;
      @(negedge clk);
      d = $urandom;
      bus_addr = 2'($urandom_range(0, 2));
      bus_wdata = d;
      bus_we = $urandom_range(0, 3) == 0;
      parity_err = $urandom_range(0, 2) == 0;
      am_full = 1'($urandom);
      fifo_overflow = 1'($urandom);
      @(posedge clk);
      #1;
      if (bus_we && bus_addr == 1) cnt = 0;
      else if (parity_err) cnt++;
      if (bus_we && bus_addr == 0) begin
        check(mode.enable == d[0] && mode.xft_req == d[1] && mode.min_si == d[4:2], "mode fields");
        check(bus_rdata == {27'd0, d[4:0]}, "mode readback");
      end
      bus_we = 0;
      bus_addr = 1;
      #1 check(bus_rdata == 32'(cnt), "parity counter");
      bus_addr = 2;
      #1 check(bus_rdata == {30'd0, fifo_overflow, am_full}, "status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
