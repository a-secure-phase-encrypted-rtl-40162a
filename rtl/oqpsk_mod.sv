// oqpsk_mod: O-QPSK chip mapper. Takes 32-chip vectors and hands them out
// as 16 (I, Q) chip pairs, even chips on I and odd chips on Q, one pair per
// chip-pair strobe (1 Mb/s per rail), as bipolar levels (+1 / -1).
//
// The half-chip offset of the Q rail is applied later by the pulse
// shaper, so here I and Q of a pair change together.
//
// Interface: `load` requests and `chips_valid`/`chips_ready` move a new
// chip vector in (ready when the vector held is used up or none is held).
// `pair_i`/`pair_q` show the current pair and `pair_valid` says one is
// held; `adv` (the key-stream strobe) consumes it. `last` is high while
// the final pair of the held vector is shown.
module oqpsk_mod
  import pe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  chipvec_t          chips,
  input  logic              chips_valid,
  output logic              chips_ready,
  input  logic              adv,
  output logic signed [1:0] pair_i,
  output logic signed [1:0] pair_q,
  output logic              pair_valid,
  output logic              last
);
  chipvec_t   vec_q;
  logic [3:0] idx_q;
  logic       full_q;

  assign pair_valid  = full_q;
  assign last        = full_q && (idx_q == 4'd15);
  assign chips_ready = !full_q || (last && adv);
  assign pair_i      = vec_q[2*idx_q]   ? 2'sd1 : -2'sd1;
  assign pair_q      = vec_q[2*idx_q+1] ? 2'sd1 : -2'sd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_q  <= '0;
      idx_q  <= '0;
      full_q <= 1'b0;
    end else if (clr) begin
      full_q <= 1'b0;
      idx_q  <= '0;
    end else begin
      if (chips_valid && chips_ready) begin
        vec_q  <= chips;
        idx_q  <= '0;
        full_q <= 1'b1;
      end else if (adv && full_q) begin
        if (last) full_q <= 1'b0;
        idx_q <= idx_q + 4'd1;
      end
    end
  end
endmodule
