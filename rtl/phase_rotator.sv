// phase_rotator: the phase encryption / phase decryption unit.
//
// Implements c = a*Re{d} + j*b*Im{d} with a, b in {+1, -1}: the I and Q
// components of a complex sample are each multiplied by one key-stream
// bit, so the sample is moved to one of the four QPSK phases chosen by the
// key. The same operation undoes itself, so one module serves both the
// transmitter (encryption of the +/-1 chip levels, W = 2) and the receiver
// (decryption of soft samples, W = ADC width). The two "multipliers" are
// conditional negations. Combinational.
//
// Key bit 0 means multiply by +1, key bit 1 means multiply by -1.
module phase_rotator #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic                key_a,   // in-phase key bit
  input  logic                key_b,   // quadrature key bit
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);
  always_comb begin
    out_i = key_a ? -in_i : in_i;
    out_q = key_b ? -in_q : in_q;
  end
endmodule
