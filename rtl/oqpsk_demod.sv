// oqpsk_demod: O-QPSK demodulator of the receiver. Takes decrypted soft
// chip-pair samples (one per key-stream strobe), decides each chip by its
// sign (>= 0 is chip 1, < 0 is chip 0) and collects 16 pairs into one
// 32-chip vector, I samples into the even chips and Q samples into the odd
// ones. `chips_valid` pulses for one cycle, the cycle after the 16th pair.
// `clr` restarts the symbol boundary; the receiver asserts it until the
// first pair after the header, so the symbol boundaries follow the header.
module oqpsk_demod
  import pe_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                stb,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output chipvec_t            chips,
  output logic                chips_valid
);
  chipvec_t   acc_q;
  logic [3:0] idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q       <= '0;
      idx_q       <= '0;
      chips       <= '0;
      chips_valid <= 1'b0;
    end else if (clr) begin
      idx_q       <= '0;
      chips_valid <= 1'b0;
    end else begin
      chips_valid <= 1'b0;
      if (stb) begin
        acc_q[2*idx_q]   <= !in_i[W-1];
        acc_q[2*idx_q+1] <= !in_q[W-1];
        idx_q <= idx_q + 4'd1;
        if (idx_q == 4'd15) begin
          chips       <= acc_q;
          chips[30]   <= !in_i[W-1];
          chips[31]   <= !in_q[W-1];
          chips_valid <= 1'b1;
        end
      end
    end
  end
endmodule
