// delay9ph_tb: places input edges at known offsets before a 250 MHz clock
// edge and checks that the sampled pattern shows the new level on exactly
// the taps whose delay (i * 450 ps) is shorter than the offset. A fixed
// list of offsets is followed by 400 random ones (60..3999 ps, kept 3 ps
// away from the tap boundaries), alternating rising and falling edges.
module delay9ph_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk250 = 1'b0;
  logic       hit_in = 1'b0;
  logic [8:0] pattern;
  int checks = 0, failures = 0;

  delay9ph dut (.clk250, .hit_in, .pattern);

  always #2 clk250 = ~clk250;   // rising edges at 2, 6, 10, ... ns

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Offsets in ps, chosen away from the 450 ps tap boundaries.
  int offs [] = '{100, 300, 600, 1000, 1400, 1700, 2100, 2500, 2900, 3300, 3700, 3900, 3990};

  initial begin
    logic lvl;
    logic [8:0] exp_p;
    lvl = 1'b0;
    repeat (3) @(posedge clk250);
    for (int r = 0; r < 400; r++) begin
      int o;
      do o = $urandom_range(60, 3999); while ((o % 450) < 3 || (o % 450) > 447);
      offs = new [offs.size() + 1] (offs);
      offs[offs.size() - 1] = o;
    end
    foreach (offs[n]) begin
      // settle, then schedule the change offs[n] ps before a clock edge
      repeat (4) @(posedge clk250);
      // from this edge, wait 4000 - offset ps: offset ps before the next edge
      repeat (4000 - offs[n]) #1ps;
      lvl    = ~lvl;
      hit_in = lvl;
      @(posedge clk250);
      #0.5;
      for (int i = 0; i < 9; i++)
        exp_p[i] = ((i + 1) * 450 < offs[n]) ? lvl : ~lvl;
      checks++;
      if (pattern !== exp_p) begin
        failures++;
        $display("offset %0d ps: pattern %b expected %b", offs[n], pattern, exp_p);
      end
      // one cycle later the whole line shows the new level
      @(posedge clk250);
      #0.5;
      checks++;
      if (pattern !== {9{lvl}}) begin
        failures++;
        $display("offset %0d ps: settled pattern %b", offs[n], pattern);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
