// trx_ctrl: operation controller of the half-duplex transceiver. It owns
// the KSA_en / PRGA_en signals of the shared key-stream generator and
// activates the transmitter, the frame synchroniser and the data
// recovery.
//
//   HDR_KSA/HDR_RUN  after `key_load`: KSA, then PRGA for 128 pairs while
//                    the secure header generator captures the encrypted
//                    preamble. Frames are refused until it is valid.
//   TX_KSA/TX_RUN    on `tx_req`: KSA_en (about 16 us at 16 MHz) while the
//                    framer fills the modulator, then PRGA_en and the
//                    frame goes out, one chip pair per key-stream strobe,
//                    until the transmit path is empty.
//   RX_SYNC          on `energy_det`: frame synchronisation runs and KSA_en
//                    is raised at once so the KSA (and the discarding of the
//                    128 header key pairs) is over before the peak.
//   RX_DATA          on a peak above threshold: PRGA_en and data recovery
//                    until the deframer reports the end of the frame or an
//                    SFD error. If no peak is found, both enables drop and
//                    the frame is abandoned (`ev_rx_drop`).
// Priority in IDLE: key load, then transmit, then receive.
//
// Lint note: rst_n also appears in an assertion's `disable iff`, which a
// linter reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only as an asynchronous reset.
module trx_ctrl
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_load,
  input  logic       tx_req,
  input  logic       energy_det,
  input  logic       ks_ready,
  input  logic       hdr_valid,
  input  logic       tx_empty,
  input  logic       sync_peak,
  input  logic       sync_fail,
  input  logic       rx_done,
  input  logic       rx_err,
  output logic       ksa_en,
  output logic       prga_en,
  output logic [7:0] skip_loops,
  output logic       hdr_start,
  output logic       hdr_capture,
  output logic       tx_start,
  output logic       tx_run,
  output logic       rx_sync_en,
  output logic       rx_data_en,
  output logic       busy,
  output logic       ev_tx_done,
  output logic       ev_rx_ok,
  output logic       ev_rx_drop,
  output logic       ev_rx_err
);
  typedef enum logic [2:0] {
    S_IDLE, S_HDR_KSA, S_HDR_RUN, S_TX_KSA, S_TX_RUN, S_RX_SYNC, S_RX_DATA
  } state_e;

  state_e st_q, st_d;

  // Loops (8 chip pairs each) of key stream used by the encrypted header.
  localparam logic [7:0] HDR_LOOPS = 8'(HDR_PAIRS / 8);

  always_comb begin
    st_d        = st_q;
    hdr_start   = 1'b0;
    tx_start    = 1'b0;
    ev_tx_done  = 1'b0;
    ev_rx_ok    = 1'b0;
    ev_rx_drop  = 1'b0;
    ev_rx_err   = 1'b0;
    unique case (st_q)
      S_IDLE: begin
        if (key_load) begin
          st_d = S_HDR_KSA;
          hdr_start = 1'b1;
        end else if (tx_req && hdr_valid) begin
          st_d = S_TX_KSA;
          tx_start = 1'b1;
        end else if (energy_det && hdr_valid) begin
          st_d = S_RX_SYNC;
        end
      end
      S_HDR_KSA: if (ks_ready) st_d = S_HDR_RUN;
      S_HDR_RUN: if (hdr_valid) st_d = S_IDLE;
      S_TX_KSA:  if (ks_ready) st_d = S_TX_RUN;
      S_TX_RUN:  if (tx_empty) begin st_d = S_IDLE; ev_tx_done = 1'b1; end
      S_RX_SYNC: begin
        if (sync_peak && ks_ready) st_d = S_RX_DATA;
        else if (sync_fail || sync_peak) begin st_d = S_IDLE; ev_rx_drop = 1'b1; end
      end
      S_RX_DATA: begin
        if (rx_done)     begin st_d = S_IDLE; ev_rx_ok  = 1'b1; end
        else if (rx_err) begin st_d = S_IDLE; ev_rx_err = 1'b1; end
      end
      default: st_d = S_IDLE;
    endcase
  end

  always_comb begin
    ksa_en      = (st_q == S_HDR_KSA) || (st_q == S_TX_KSA) || (st_q == S_RX_SYNC);
    prga_en     = (st_q == S_HDR_RUN) || (st_q == S_TX_RUN) || (st_q == S_RX_DATA);
    skip_loops  = (st_q == S_RX_SYNC) ? HDR_LOOPS : 8'd0;
    hdr_capture = (st_q == S_HDR_RUN);
    tx_run      = (st_q == S_TX_RUN);
    rx_sync_en  = (st_q == S_RX_SYNC);
    rx_data_en  = (st_q == S_RX_DATA);
    busy        = (st_q != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= S_IDLE;
    else        st_q <= st_d;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(ksa_en && prga_en));
endmodule
