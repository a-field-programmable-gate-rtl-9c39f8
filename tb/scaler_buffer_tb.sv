// scaler_buffer_tb: models the 64-channel scaler shift chain, loads random
// 8-bit counts every 2048 ns while switching between the 8 buffers, and
// checks every 32-bit total read back through the second port against sums
// kept by the testbench. Also checks the 128-cycle sweep timing.
module scaler_buffer_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk62 = 1'b0, rst = 1'b1;
  logic [TCHI_W-1:0] tc_hi = '0;
  logic [2:0] bank = '0;
  logic [SC_W-1:0] sch_in;
  logic sc_latch, sc_shift, init_done;
  logic [8:0] rd_addr = '0;
  logic [SCT_W-1:0] rd_data;
  int checks = 0, failures = 0;

  scaler_buffer dut (.*);

  always #8 clk62 = ~clk62;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  logic [SC_W-1:0]  chain [64];
  logic [SC_W-1:0]  cnt   [64];
  longint           total [8][64];
  bit               counting = 0;
  logic [2:0]       bank_q;

  assign sch_in = chain[0];

  always @(posedge clk62) begin
    if (rst) tc_hi <= '0;
    else     tc_hi <= tc_hi + 1'b1;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int periods, n_lat;
    bit lat, sh;
    foreach (chain[i]) chain[i] = '0;
    foreach (total[b, i]) total[b][i] = 0;
    repeat (2) @(negedge clk62);
    rst = 1'b0;
    periods = 0; n_lat = 0;
    while (periods < 40) begin
      @(negedge clk62);
      check(sc_latch == (tc_hi[6:0] == 7'd127), "latch timing");
      check(sc_shift == tc_hi[0], "shift timing");
      if (sc_latch) begin
        n_lat++;
        if (init_done) periods++;
        counting = init_done && periods < 36;
        if (periods % 5 == 0) bank = 3'($urandom);
        bank_q = bank;
        foreach (cnt[i]) cnt[i] = counting ? SC_W'($urandom_range(0, 128)) : '0;
        foreach (cnt[i]) total[bank_q][i] += cnt[i];
      end
      // chain model, applied at the coming edge
      lat = sc_latch;
      sh  = sc_shift;
      @(posedge clk62);
      #1;
      if (lat) foreach (chain[i]) chain[i] = cnt[i];
      else if (sh) begin
        for (int i = 0; i < 63; i++) chain[i] = chain[i+1];
        chain[63] = '0;
      end
    end
    // read back every total of every buffer
    for (int a = 0; a < 512; a++) begin
      @(negedge clk62);
      rd_addr = 9'(a);
      @(negedge clk62);
      check(rd_data == SCT_W'(total[a / 64][a % 64]),
            $sformatf("buffer %0d channel %0d: %0d exp %0d", a / 64, a % 64, rd_data, total[a / 64][a % 64]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
