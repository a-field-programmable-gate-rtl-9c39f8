// tdc_regs_tb: writes random values to the control registers and checks the
// configuration outputs and read-back, checks reset values, the status and
// counter read-outs, and that reading the event word removes it only when
// one is available.
module tdc_regs_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic we = 1'b0, re = 1'b0;
  tdc_cfg_t cfg;
  logic [8:0] sc_addr;
  logic out_pop;
  logic cip = 1'b0, init_done = 1'b0, dropped = 1'b0, out_valid = 1'b0;
  hit_t out_hit = '0;
  logic [9:0] out_count = '0;
  logic [SCT_W-1:0] sc_data = '0;
  logic [15:0] n_accepted = '0, n_rejected = '0, n_outside = '0;
  int checks = 0, failures = 0;

  tdc_regs dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    addr = a; wdata = d; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    addr = a; re = 1'b1;
    #1;
    d = rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, r;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(!cfg.mhe_en && cfg.cb_mode == CB_2X2048 && cfg.tw_lo == 0 && cfg.tw_hi == 11'h7FF,
          "reset values");
    for (int i = 0; i < 200; i++) begin
      v = $urandom;
      bus_write(REG_CTRL, v);
      check(cfg.mhe_en == v[0] && cfg.mhe_update == v[1] && cfg.mhe_win == v[7:2] &&
            cfg.cb_mode == cb_mode_e'(v[9:8]) && cfg.sc_bank == v[12:10], "CTRL fields");
      bus_read(REG_CTRL, r);
      check(r == {19'd0, v[12:0]}, "CTRL read-back");
      re = 1'b0;
      v = $urandom;
      bus_write(REG_TWIN, v);
      check(cfg.tw_lo == v[10:0] && cfg.tw_hi == v[26:16], "TWIN fields");
      bus_read(REG_TWIN, r);
      check(r == {5'd0, v[26:16], 5'd0, v[10:0]}, "TWIN read-back");
      re = 1'b0;
      v = $urandom;
      bus_write(REG_SCADDR, v);
      check(sc_addr == v[8:0], "SCADDR");
      // status and data sources
      cip = 1'($urandom); init_done = 1'($urandom); dropped = 1'($urandom);
      out_valid = 1'($urandom); out_hit = hit_t'($urandom); out_count = 10'($urandom);
      sc_data = $urandom; n_accepted = 16'($urandom); n_rejected = 16'($urandom);
      n_outside = 16'($urandom);
      bus_read(REG_STATUS, r);
      check(r[0] == cip && r[1] == init_done && r[2] == dropped && r[3] == out_valid &&
            r[25:16] == out_count, "STATUS");
      check(!out_pop, "no pop on status read");
      bus_read(REG_OUT, r);
      check(r[31] == out_valid && r[21:0] == out_hit && out_pop == out_valid, "OUT and pop");
      bus_read(REG_SCDATA, r);
      check(r == sc_data, "SCDATA");
      bus_read(REG_EVCNT, r);
      check(r == {n_rejected, n_accepted}, "EVCNT");
      bus_read(REG_TWOUT, r);
      check(r == {16'd0, n_outside}, "TWOUT");
      re = 1'b0;
      #1;
      check(rdata == 0 && !out_pop, "idle bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
