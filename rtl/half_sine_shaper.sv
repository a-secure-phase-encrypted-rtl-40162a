// half_sine_shaper: half-sine pulse shaping of the encrypted O-QPSK chip
// pairs, 1 Mb/s per rail in, 16 Msample/s per rail out.
//
// Each chip is sent as a half-sine pulse one chip-pair period long (16
// samples at the 16 MHz system clock): sample n of the pulse is
// sign * round(AMP * sin(pi*n/16)), n = 0..15. The Q pulse starts 8
// samples (half a chip-pair period, one chip time) after the I pulse, which
// gives the O-QPSK offset. Output is zero when no chip is being sent.
//
// Interface: `stb` (one cycle) delivers the next pair as two bipolar
// levels; consecutive pairs must be exactly 16 cycles apart for the pulse
// train to be continuous. The first I sample of a pair appears in the cycle
// after `stb`, the first Q sample 8 cycles later. The sample rate and the
// offset follow the transmitter block diagram; the amplitude is this
// design's choice.
//
// Lint note: rst_n also appears in an assertion's `disable iff`, which a
// linter reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only as an asynchronous reset.
// Bit 0 of chip_i/chip_q is unused: a bipolar level (+1 or -1) is
// fully given by its sign bit, which selects the pulse polarity.
module half_sine_shaper #(
  parameter int unsigned SW  = 8,     // output sample width
  parameter int unsigned AMP = 127    // pulse peak
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 stb,
  input  logic signed [1:0]    chip_i,
  input  logic signed [1:0]    chip_q,
  output logic signed [SW-1:0] samp_i,
  output logic signed [SW-1:0] samp_q
);
  // Quarter of the sine table is enough: sin(pi*n/16), n = 0..8.
  function automatic logic [SW-1:0] sine_mag(input logic [3:0] n);
    logic [3:0] m;
    logic [SW-1:0] v;
    m = (n > 4'd8) ? 4'(5'd16 - 5'(n)) : n;
    case (m)
      4'd0: v = SW'(0);
      4'd1: v = SW'((AMP * 1951 + 5000) / 10000);  // 0.1951 * AMP
      4'd2: v = SW'((AMP * 3827 + 5000) / 10000);  // 0.3827 * AMP
      4'd3: v = SW'((AMP * 5556 + 5000) / 10000);  // 0.5556 * AMP
      4'd4: v = SW'((AMP * 7071 + 5000) / 10000);  // 0.7071 * AMP
      4'd5: v = SW'((AMP * 8315 + 5000) / 10000);  // 0.8315 * AMP
      4'd6: v = SW'((AMP * 9239 + 5000) / 10000);  // 0.9239 * AMP
      4'd7: v = SW'((AMP * 9808 + 5000) / 10000);  // 0.9808 * AMP
      default: v = SW'(AMP);
    endcase
    return v;
  endfunction

  logic [3:0] n_q;
  logic       i_act_q, i_neg_q;
  logic       q_act_q, q_neg_q;
  logic       qp_act_q, qp_neg_q;   // Q chip waiting for its half-chip offset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q      <= 4'd15;
      i_act_q  <= 1'b0;
      i_neg_q  <= 1'b0;
      q_act_q  <= 1'b0;
      q_neg_q  <= 1'b0;
      qp_act_q <= 1'b0;
      qp_neg_q <= 1'b0;
    end else begin
      if (stb) begin
        n_q      <= 4'd0;
        i_act_q  <= 1'b1;
        i_neg_q  <= chip_i[1];
        qp_act_q <= 1'b1;
        qp_neg_q <= chip_q[1];
      end else begin
        n_q <= n_q + 4'd1;
        if (n_q == 4'd15) i_act_q <= 1'b0;
      end
      // Q pulse boundary sits half-way through the I pulse
      if (!stb && n_q == 4'd7) begin
        q_act_q  <= qp_act_q;
        q_neg_q  <= qp_neg_q;
        qp_act_q <= 1'b0;
      end
    end
  end

  logic [SW-1:0] mag_i, mag_q;
  always_comb begin
    mag_i  = sine_mag(n_q);
    mag_q  = sine_mag(n_q ^ 4'd8);
    samp_i = !i_act_q ? '0 : (i_neg_q ? -$signed(mag_i) : $signed(mag_i));
    samp_q = !q_act_q ? '0 : (q_neg_q ? -$signed(mag_q) : $signed(mag_q));
  end

  // Pairs arrive once per 16-sample pulse.
  assert property (@(posedge clk) disable iff (!rst_n) stb |-> (n_q == 4'd15 || !i_act_q));
endmodule
