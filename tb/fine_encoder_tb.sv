// fine_encoder_tb: feeds thermometer patterns (k taps at a new level, the rest
// at the previous level) and checks hit, code = k - 1 and polarity, plus
// cycles with no edge.
module fine_encoder_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk250 = 1'b0;
  logic       rst = 1'b1;
  logic [8:0] pattern = '0;
  logic       hit, pol;
  logic [3:0] fine;
  int checks = 0, failures = 0;

  fine_encoder dut (.clk250, .rst, .pattern, .hit, .fine, .pol);

  always #2 clk250 = ~clk250;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lvl, nl;
    int   k;
    logic e_hit, e_pol;
    int   e_code;
    lvl = 1'b0;
    repeat (2) @(posedge clk250);
    rst <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      k  = (n < 20) ? (n % 10) : $urandom_range(0, 9);
      nl = ~lvl;
      for (int i = 0; i < 9; i++) pattern[i] = (i < k) ? nl : lvl;
      e_hit  = (k > 0);
      e_code = k - 1;
      e_pol  = nl;
      if (k > 0) lvl = pattern[0];
      @(posedge clk250);   // pattern sampled by the encoder here
      #1;
      checks++;
      if (hit !== e_hit || (e_hit && (fine !== 4'(e_code) || pol !== e_pol))) begin
        failures++;
        $display("k=%0d: hit %b fine %0d pol %b, expected %b %0d %b",
                 k, hit, fine, pol, e_hit, e_code, e_pol);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
