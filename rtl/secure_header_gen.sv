// secure_header_gen: builds and holds the encrypted synchronisation header
// the receiver correlates against.
//
// The header is the 802.15.4 preamble (8 zero symbols = 256 chips = 128
// complex chip pairs) phase-encrypted with the first 128 key-stream pairs
// of a fresh RC4 run, exactly as the transmitter sends it. While `capture`
// is high, each key-stream strobe takes one (KS_I, KS_Q) pair, multiplies
// the matching preamble pair by it (XOR in the bit domain) and stores the
// resulting encrypted chip bits. `hdr_valid` rises after the 128th pair.
// `start` clears the store for a new key.
//
// Header bit p of hdr_i / hdr_q is the encrypted I / Q chip of pair p
// (1 = +1, 0 = -1); pair 0 is the first one on air.
module secure_header_gen
  import pe_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 capture,
  input  logic                 ks_stb,
  input  logic                 ks_i,
  input  logic                 ks_q,
  output logic [HDR_PAIRS-1:0] hdr_i,
  output logic [HDR_PAIRS-1:0] hdr_q,
  output logic                 hdr_valid
);
  logic [7:0] idx_q;
  logic [1:0] pre;

  always_comb pre = preamble_pair(int'(idx_q[6:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_i     <= '0;
      hdr_q     <= '0;
      idx_q     <= '0;
      hdr_valid <= 1'b0;
    end else if (start) begin
      idx_q     <= '0;
      hdr_valid <= 1'b0;
    end else if (capture && ks_stb && !hdr_valid) begin
      hdr_i[idx_q[6:0]] <= pre[1] ^ ks_i;
      hdr_q[idx_q[6:0]] <= pre[0] ^ ks_q;
      idx_q <= idx_q + 8'd1;
      if (idx_q == 8'(HDR_PAIRS - 1)) hdr_valid <= 1'b1;
    end
  end
endmodule
