// frame_sync: frame synchronisation and detection of the receiver.
//
// Once energy has been detected (`en` high) the block shifts every
// received chip pair (soft I and Q samples, one per chip-pair tick) into a
// window as long as the encrypted header and cross-correlates the window
// with the header from the secure header generator:
//   corr   = sum_p ( h_i[p] * x_i[p] + h_q[p] * x_q[p] ),  h in {+1, -1}
//   energy = sum_p ( |x_i[p]| + |x_q[p]| )
// corr / energy is the normalised correlator output (1.0 for a perfect
// match at any amplitude). A peak is declared when the window is full and
// corr >= THRESH_Q8/256 * energy; the threshold crossing is taken as the
// peak. If no peak appears within SEARCH_PAIRS pairs after `en` rises, the
// frame is rejected (`fail`) so the key-stream generator can be stopped.
//
// Timing: a pair presented with `tick` in cycle t is in the window in
// cycle t+1; corr/energy are registered at the end of t+1 and `peak` or
// `fail` pulses in cycle t+2, well before the next tick (16 cycles later).
module frame_sync
  import pe_pkg::*;
#(
  parameter int unsigned W            = 8,
  parameter int unsigned THRESH_Q8    = 128,   // 0.5
  parameter int unsigned SEARCH_PAIRS = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  tick,
  input  logic signed [W-1:0]   rx_i,
  input  logic signed [W-1:0]   rx_q,
  input  logic [HDR_PAIRS-1:0]  hdr_i,
  input  logic [HDR_PAIRS-1:0]  hdr_q,
  output logic                  peak,
  output logic                  fail,
  output logic signed [W+9:0]   corr,
  output logic [W+9:0]          energy
);
  localparam int unsigned CW = W + 10;   // 256 terms of W bits

  logic signed [W-1:0] win_i [HDR_PAIRS];
  logic signed [W-1:0] win_q [HDR_PAIRS];
  logic [8:0]  fill_q;
  logic [15:0] seen_q;
  logic        calc_q, done_q;

  logic signed [CW-1:0] corr_c;
  logic [CW-1:0]        energy_c;
  always_comb begin
    corr_c   = '0;
    energy_c = '0;
    for (int p = 0; p < HDR_PAIRS; p++) begin
      corr_c   = hdr_i[p] ? corr_c + CW'(win_i[p]) : corr_c - CW'(win_i[p]);
      corr_c   = hdr_q[p] ? corr_c + CW'(win_q[p]) : corr_c - CW'(win_q[p]);
      energy_c = energy_c + CW'(win_i[p] < 0 ? -CW'(win_i[p]) : CW'(win_i[p]))
                          + CW'(win_q[p] < 0 ? -CW'(win_q[p]) : CW'(win_q[p]));
    end
  end

  logic hit;
  always_comb
    hit = (fill_q >= 9'(HDR_PAIRS)) && (corr_c > 0) &&
          ((2*CW)'($unsigned(corr_c)) * (2*CW)'(256) >= (2*CW)'(energy_c) * (2*CW)'(THRESH_Q8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < HDR_PAIRS; p++) begin
        win_i[p] <= '0;
        win_q[p] <= '0;
      end
      fill_q <= '0; seen_q <= '0;
      calc_q <= 1'b0; done_q <= 1'b0;
      peak <= 1'b0; fail <= 1'b0;
      corr <= '0; energy <= '0;
    end else if (!en) begin
      for (int p = 0; p < HDR_PAIRS; p++) begin
        win_i[p] <= '0;
        win_q[p] <= '0;
      end
      fill_q <= '0; seen_q <= '0;
      calc_q <= 1'b0; done_q <= 1'b0;
      peak <= 1'b0; fail <= 1'b0;
    end else begin
      peak   <= 1'b0;
      fail   <= 1'b0;
      calc_q <= tick && !done_q;
      if (tick && !done_q) begin
        // newest pair at the top: window[p] lines up with header pair p
        for (int p = 0; p < HDR_PAIRS - 1; p++) begin
          win_i[p] <= win_i[p+1];
          win_q[p] <= win_q[p+1];
        end
        win_i[HDR_PAIRS-1] <= rx_i;
        win_q[HDR_PAIRS-1] <= rx_q;
        if (fill_q < 9'(HDR_PAIRS)) fill_q <= fill_q + 9'd1;
        seen_q <= seen_q + 16'd1;
      end
      if (calc_q) begin
        corr   <= corr_c;
        energy <= energy_c;
        if (hit) begin
          peak   <= 1'b1;
          done_q <= 1'b1;
        end else if (seen_q >= 16'(SEARCH_PAIRS)) begin
          fail   <= 1'b1;
          done_q <= 1'b1;
        end
      end
    end
  end
endmodule
