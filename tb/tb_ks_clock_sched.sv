// tb_ks_clock_sched: checks the clock selection and scheduling rules:
// KSA_en alone (not done): phi every cycle, CLK1 and CLK3 alternating,
// CLK1 first; KSA_en with done: no enables; PRGA_en: phi on each derived
// tick, CLK1 on ticks 0, 8, 16, ... and CLK3 on ticks 4, 12, ...; PRGA_en
// has priority over KSA_en; both low: nothing.
module tb_ks_clock_sched;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic derived_tick, ksa_en, prga_en, done, phi_en, clk1_en, clk3_en;
  ks_clock_sched dut (.*);
  int div = 0;
  always @(posedge clk) div <= (div == 15) ? 0 : div + 1;
  assign derived_tick = (div == 3);

  initial begin
    int nt;
    ksa_en = 0; prga_en = 0; done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20) begin
      @(negedge clk);
      check(!phi_en && !clk1_en && !clk3_en, "idle: no clocks");
    end
    ksa_en = 1;
    for (int c = 0; c < 40; c++) begin
      #1;
      check(phi_en, "KSA: phi every cycle");
      check(clk1_en == (c % 2 == 0) && clk3_en == (c % 2 == 1), $sformatf("KSA phase %0d", c));
      @(negedge clk);
    end
    done = 1;
    repeat (10) begin
      #1; check(!phi_en && !clk1_en && !clk3_en, "KSA done: clocks stopped");
      @(negedge clk);
    end
    prga_en = 1;   // KSA_en still high: PRGA wins
    nt = 0;
    repeat (16 * 40) begin
      #1;
      check(phi_en == derived_tick, "PRGA: phi is the derived tick");
      if (derived_tick) begin
        check(clk1_en == (nt % 8 == 0), $sformatf("PRGA CLK1 at tick %0d", nt));
        check(clk3_en == (nt % 8 == 4), $sformatf("PRGA CLK3 at tick %0d", nt));
        nt++;
      end else check(!clk1_en && !clk3_en, "PRGA: no enable between ticks");
      @(negedge clk);
    end
    prga_en = 0; ksa_en = 0;
    repeat (5) begin #1; check(!phi_en, "off again"); @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
