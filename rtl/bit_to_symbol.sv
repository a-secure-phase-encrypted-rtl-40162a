// bit_to_symbol: splits the 250 kb/s byte stream of the transmitter into
// 4-bit data symbols (62.5 ksymbol/s), low nibble first as in the
// 802.15.4 PHY.
//
// Interface: byte input and symbol output both use a valid/ready
// handshake; a transfer happens in a cycle where valid and ready are high.
// A byte is accepted when the block is empty, then gives two symbols
// (bits 3:0, then bits 7:4). Output is registered; a byte accepted in
// cycle t shows its first symbol in cycle t+1. Throughput is one symbol
// per cycle, far above what the chip-rate modulator draws.
//
// Lint note: rst_n also appears in an assertion's `disable iff`, which a
// linter reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only as an asynchronous reset.
module bit_to_symbol (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,        // synchronous flush between frames
  input  logic [7:0] byte_data,
  input  logic       byte_valid,
  output logic       byte_ready,
  output logic [3:0] sym,
  output logic       sym_valid,
  input  logic       sym_ready
);
  logic [7:0] buf_q;
  logic [1:0] left_q;   // symbols still to send from buf_q

  assign byte_ready = (left_q == 2'd0) || (left_q == 2'd1 && sym_ready);
  assign sym_valid  = (left_q != 2'd0);
  assign sym        = (left_q == 2'd2) ? buf_q[3:0] : buf_q[7:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      left_q <= '0;
    end else if (clr) begin
      left_q <= '0;
    end else begin
      if (byte_valid && byte_ready) begin
        buf_q  <= byte_data;
        left_q <= 2'd2;
      end else if (sym_valid && sym_ready) begin
        left_q <= left_q - 2'd1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) left_q <= 2'd2);
endmodule
