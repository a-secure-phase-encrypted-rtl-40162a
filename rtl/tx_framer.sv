// tx_framer: builds the 802.15.4 PHY frame for the transmitter: four
// preamble bytes 0x00, the start-of-frame delimiter 0xA7, the PHY header
// (frame length, 0..127) and then the PSDU bytes, which it pulls from the
// MAC. Because the whole frame, preamble included, goes through the phase
// encryption, the preamble is sent as the secure header.
//
// Interface: `start` with `len` begins a frame (ignored while busy). PSDU
// bytes come in over mac_data/mac_valid/mac_ready and frame bytes leave
// over out_data/out_valid/out_ready (combinational pass-through during the
// PSDU part). `done` is high once the last byte has been handed on.
module tx_framer
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] len,
  input  logic [7:0] mac_data,
  input  logic       mac_valid,
  output logic       mac_ready,
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {F_IDLE, F_PRE, F_SFD, F_PHR, F_PSDU, F_DONE} fstate_e;
  fstate_e    st_q;
  logic [6:0] cnt_q, len_q;

  always_comb begin
    out_data  = 8'h00;
    out_valid = 1'b0;
    mac_ready = 1'b0;
    unique case (st_q)
      F_PRE:  begin out_data = 8'h00;        out_valid = 1'b1; end
      F_SFD:  begin out_data = SFD_BYTE;     out_valid = 1'b1; end
      F_PHR:  begin out_data = {1'b0, len_q}; out_valid = 1'b1; end
      F_PSDU: begin
        out_data  = mac_data;
        out_valid = mac_valid;
        mac_ready = out_ready;
      end
      default: ;
    endcase
    busy = (st_q != F_IDLE) && (st_q != F_DONE);
    done = (st_q == F_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= F_IDLE;
      cnt_q <= '0;
      len_q <= '0;
    end else begin
      unique case (st_q)
        F_IDLE, F_DONE: if (start) begin
          st_q  <= F_PRE;
          cnt_q <= '0;
          len_q <= len;
        end
        F_PRE: if (out_ready) begin
          cnt_q <= cnt_q + 7'd1;
          if (cnt_q == 7'(PREAMBLE_BYTES - 1)) st_q <= F_SFD;
        end
        F_SFD: if (out_ready) st_q <= F_PHR;
        F_PHR: if (out_ready) begin
          cnt_q <= '0;
          st_q  <= (len_q == 7'd0) ? F_DONE : F_PSDU;
        end
        F_PSDU: if (out_ready && mac_valid) begin
          cnt_q <= cnt_q + 7'd1;
          if (cnt_q == len_q - 7'd1) st_q <= F_DONE;
        end
        default: st_q <= F_IDLE;
      endcase
    end
  end
endmodule
