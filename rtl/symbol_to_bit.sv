// symbol_to_bit: joins received 4-bit symbols into bytes, the first
// symbol of a pair giving bits 3:0 and the second bits 7:4 (the order of
// bit_to_symbol). `byte_valid` pulses the cycle after the second symbol.
// `clr` drops a half-collected byte.
module symbol_to_bit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [3:0] sym,
  input  logic       sym_valid,
  output logic [7:0] byte_data,
  output logic       byte_valid
);
  logic [3:0] lo_q;
  logic       half_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q       <= '0;
      half_q     <= 1'b0;
      byte_data  <= '0;
      byte_valid <= 1'b0;
    end else if (clr) begin
      half_q     <= 1'b0;
      byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (sym_valid) begin
        if (!half_q) begin
          lo_q   <= sym;
          half_q <= 1'b1;
        end else begin
          byte_data  <= {sym, lo_q};
          byte_valid <= 1'b1;
          half_q     <= 1'b0;
        end
      end
    end
  end
endmodule
