// rx_deframer: reads the decoded bytes that follow the secure header: the
// first must be the SFD 0xA7, the second is the PHY header whose low seven
// bits give the PSDU length, and the next `length` bytes are passed to the
// MAC (mac_valid, one cycle per byte; the MAC must take them). `done`
// pulses after the last PSDU byte (or after the header if the length is
// 0); `err` pulses if the SFD is wrong. `clr` returns to the SFD state.
module rx_deframer
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic [7:0] mac_data,
  output logic       mac_valid,
  output logic [6:0] frame_len,
  output logic       done,
  output logic       err
);
  typedef enum logic [1:0] {D_SFD, D_PHR, D_PSDU, D_END} dstate_e;
  dstate_e    st_q;
  logic [6:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= D_SFD;
      cnt_q     <= '0;
      frame_len <= '0;
      mac_data  <= '0;
      mac_valid <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
    end else if (clr) begin
      st_q      <= D_SFD;
      mac_valid <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
    end else begin
      mac_valid <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      if (in_valid) begin
        unique case (st_q)
          D_SFD: if (in_data == SFD_BYTE) st_q <= D_PHR;
                 else begin err <= 1'b1; st_q <= D_END; end
          D_PHR: begin
            frame_len <= in_data[6:0];
            cnt_q     <= '0;
            if (in_data[6:0] == 7'd0) begin done <= 1'b1; st_q <= D_END; end
            else st_q <= D_PSDU;
          end
          D_PSDU: begin
            mac_data  <= in_data;
            mac_valid <= 1'b1;
            cnt_q     <= cnt_q + 7'd1;
            if (cnt_q == frame_len - 7'd1) begin done <= 1'b1; st_q <= D_END; end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
