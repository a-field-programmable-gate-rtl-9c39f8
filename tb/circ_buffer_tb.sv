// circ_buffer_tb: in each organisation (2 x 128, 4 x 64, 8 x 32 words) writes
// random hit/empty words every cycle, triggers repeatedly, and checks that
// each copy delivers exactly the valid hits of the last pipeline-length
// cycles before the trigger, oldest first, under a randomly stalling reader.
// Also checks the copy time, the rotation through all pipelines and that a
// trigger during a copy is ignored.
module circ_buffer_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk62 = 1'b0, rst = 1'b1;
  cb_mode_e mode = CB_2X2048;
  logic wr_valid = 1'b0, trig = 1'b0, rd_ready = 1'b0;
  hit_t wr_hit = '0, rd_hit;
  logic rd_valid, busy, init_done;
  int checks = 0, failures = 0;

  circ_buffer dut (.*);

  always #8 clk62 = ~clk62;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        hv [$];
    hit_t        hh [$];
    hit_t        exp_q [$];
    int          len, trig_cyc, busy_len, n_ev, ignored;
    bit          reading;
    for (int m = 0; m < 3; m++) begin
      mode = cb_mode_e'(m);
      len  = 128 >> m;
      rst  = 1'b1;
      repeat (2) @(negedge clk62);
      rst  = 1'b0;
      while (!init_done) @(negedge clk62);
      hv.delete(); hh.delete();
      reading = 0; n_ev = 0; ignored = 0; trig_cyc = -1000;
      for (int c = 0; c < 30 * len + 2000; c++) begin
        // rd_* reflect the state after the last edge; a word moves at the
        // next edge if rd_ready is high then
        rd_ready = ($urandom_range(0, 9) < 6);
        if (rd_valid && rd_ready) begin
          check(reading && exp_q.size() > 0 && rd_hit == exp_q[0], $sformatf("m%0d c%0d copied hit %h exp %h n %0d rd %b", m, c, rd_hit, exp_q.size() ? exp_q[0] : 0, exp_q.size(), reading));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
        end
        if (reading && !busy) begin
          check(exp_q.size() == 0, $sformatf("hits missing: %0d", exp_q.size()));
          check(busy_len >= len, $sformatf("copy took %0d cycles", busy_len));
          reading = 0;
          n_ev++;
        end
        if (busy) busy_len++;
        // drive the next cycle
        wr_valid = ($urandom_range(0, 9) < 3);
        wr_hit   = hit_t'($urandom);
        trig     = 1'b0;
        if (!busy && !reading && hv.size() >= len + 8 && (c - trig_cyc) > len + 20
            && $urandom_range(0, 9) == 0) begin
          trig = 1'b1;
          trig_cyc = c;
          exp_q.delete();
          for (int i = hv.size() - len + 1; i < hv.size(); i++)
            if (hv[i]) exp_q.push_back(hh[i]);
          if (wr_valid) exp_q.push_back(wr_hit);
          reading  = 1;
          busy_len = 0;
        end else if (busy && $urandom_range(0, 30) == 0) begin
          trig = 1'b1;                       // must be ignored
          ignored++;
        end
        hv.push_back(wr_valid);
        hh.push_back(wr_hit);
        @(negedge clk62);
      end
      check(n_ev >= 10, $sformatf("mode %0d: %0d events", m, n_ev));
      check(ignored > 0, "trigger during copy tried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
