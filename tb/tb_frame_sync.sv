// tb_frame_sync: a random 128-pair header; the channel carries random
// noise pairs, then the header as +/-A levels with noise, then random
// data. Checked: the peak comes exactly two cycles after the tick of the
// last header pair and never earlier; the correlation and energy reported
// equal sums computed here; a burst that carries a different header (an
// adversary or bogus frame) ends in `fail` after SEARCH_PAIRS pairs
// without a peak.
module tb_frame_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic en, tick, peak, fail;
  logic signed [7:0] rx_i, rx_q;
  logic [127:0] hdr_i, hdr_q;
  logic signed [17:0] corr; logic [17:0] energy;
  frame_sync #(.W(8), .THRESH_Q8(128), .SEARCH_PAIRS(256)) dut (.*);

  int xi [400], xq [400];
  function automatic int clip(input int v);
    return (v > 127) ? 127 : (v < -127) ? -127 : v;
  endfunction

  task automatic burst(input bit genuine, input int lead, output int t_peak, output int t_fail, output int t_last);
    logic [127:0] oi, oq;
    oi = genuine ? hdr_i : {$urandom, $urandom, $urandom, $urandom};
    oq = genuine ? hdr_q : {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 400; k++) begin
      if (k < lead || k >= lead + 128) begin
        xi[k] = int'($urandom_range(160)) - 80;
        xq[k] = int'($urandom_range(160)) - 80;
      end else begin
        xi[k] = clip((oi[k - lead] ? 100 : -100) + int'($urandom_range(60)) - 30);
        xq[k] = clip((oq[k - lead] ? 100 : -100) + int'($urandom_range(60)) - 30);
      end
    end
    t_peak = -1; t_fail = -1; t_last = lead + 127;
    @(negedge clk); en = 1;
    for (int k = 0; k < 400 && t_peak < 0 && t_fail < 0; k++) begin
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        tick = (c == 0); rx_i = 8'(xi[k]); rx_q = 8'(xq[k]);
        if (peak) t_peak = k;
        if (fail) t_fail = k;
        if (peak && c == 2) begin
          int cs, es;
          cs = 0; es = 0;
          for (int p = 0; p < 128; p++) begin
            cs += (hdr_i[p] ? 1 : -1) * xi[k - 127 + p] + (hdr_q[p] ? 1 : -1) * xq[k - 127 + p];
            es += (xi[k - 127 + p] < 0 ? -xi[k - 127 + p] : xi[k - 127 + p])
                + (xq[k - 127 + p] < 0 ? -xq[k - 127 + p] : xq[k - 127 + p]);
          end
          check(int'(corr) == cs, $sformatf("correlation %0d vs %0d", corr, cs));
          check(int'(energy) == es, $sformatf("energy %0d vs %0d", energy, es));
          t_peak = k;
        end
      end
    end
    tick = 0;
    @(negedge clk); en = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int tp, tf, tl;
    en = 0; tick = 0; rx_i = 0; rx_q = 0;
    hdr_i = {$urandom, $urandom, $urandom, $urandom};
    hdr_q = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      burst(1'b1, 5 + 20 * f, tp, tf, tl);
      check(tp == tl, $sformatf("peak at pair %0d, header ends at %0d", tp, tl));
      check(tf < 0, "no failure on a genuine frame");
    end
    for (int f = 0; f < 3; f++) begin
      burst(1'b0, 10, tp, tf, tl);
      check(tp < 0, "no peak on a foreign header");
      check(tf == 255, $sformatf("failure at pair index %0d (256th pair)", tf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
