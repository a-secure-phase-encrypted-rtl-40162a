// pe_transceiver: phase-encrypted IEEE 802.15.4 (2.4 GHz O-QPSK) baseband
// transceiver.
//
// Transmit path: MAC bytes -> tx_framer (preamble, SFD, length) ->
// bit_to_symbol -> symbol_to_chip -> oqpsk_mod -> phase_rotator (phase
// encryption with the RC4 key stream, one key bit per rail per chip pair)
// -> half_sine_shaper -> 16 Msample/s I/Q samples for the DAC/RF.
// Receive path: chip-rate soft I/Q samples -> frame_sync (correlation with
// the encrypted header from secure_header_gen) -> phase_rotator (phase
// decryption) -> oqpsk_demod -> chip_to_symbol -> symbol_to_bit ->
// rx_deframer -> MAC. keystream_gen is shared by both paths and trx_ctrl
// sequences KSA_en and PRGA_en.
//
// Clocking: one 16 MHz system clock. The derived clock (1 MHz, one chip
// pair per rail per microsecond) is a one-cycle tick every CLK_DIV cycles,
// brought out as `chip_tick`. The receiver expects one matched-filter
// sample per rail per chip pair, presented with `chip_tick`: chip timing
// recovery and the analog/RF front end are outside this block.
//
// Operation: pulse `key_load` after setting `secret_key` and wait for
// `hdr_valid` (about 145 us). A frame is sent with `tx_req`/`tx_len`; its
// PSDU bytes are then pulled over mac_tx_*. The air signal starts about
// 16 us after the request (KSA time). A receive starts on `energy_det`;
// PSDU bytes appear on mac_rx_* once the header has been found.
//
// Lint note: rst_n also appears in an assertion's `disable iff`, which a
// linter reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only as an asynchronous reset.
module pe_transceiver
  import pe_pkg::*;
#(
  parameter int unsigned KEY_BYTES = 16,
  parameter int unsigned CLK_DIV   = 16,    // 16 MHz / 1 MHz
  parameter int unsigned W         = 8,     // received sample width
  parameter int unsigned SW        = 8,     // transmitted sample width
  parameter int unsigned THRESH_Q8 = 128    // detection threshold, 0.5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // key
  input  logic [8*KEY_BYTES-1:0] secret_key,
  input  logic                   key_load,
  output logic                   hdr_valid,
  output logic                   ksa_done,
  // MAC transmit side
  input  logic                   tx_req,
  input  logic [6:0]             tx_len,
  input  logic [7:0]             mac_tx_data,
  input  logic                   mac_tx_valid,
  output logic                   mac_tx_ready,
  // to DAC / RF
  output logic signed [SW-1:0]   tx_i,
  output logic signed [SW-1:0]   tx_q,
  output logic                   tx_on,
  // from RF / ADC
  output logic                   chip_tick,
  input  logic                   energy_det,
  input  logic signed [W-1:0]    rx_i,
  input  logic signed [W-1:0]    rx_q,
  // MAC receive side
  output logic [7:0]             mac_rx_data,
  output logic                   mac_rx_valid,
  output logic [6:0]             rx_len,
  output logic [5:0]             rx_chip_dist,   // Hamming distance of last symbol
  // status
  output logic                   busy,
  output logic                   ev_tx_done,
  output logic                   ev_rx_ok,
  output logic                   ev_rx_drop,
  output logic                   ev_rx_err,
  output logic signed [W+9:0]    sync_corr,
  output logic [W+9:0]           sync_energy
);
  // ---------------- derived clock ----------------
  logic [$clog2(CLK_DIV)-1:0] div_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_q <= '0;
    else        div_q <= (div_q == ($clog2(CLK_DIV))'(CLK_DIV - 1)) ? '0 : div_q + 1'b1;
  end
  assign chip_tick = (div_q == '0);

  // ---------------- control ----------------
  logic ksa_en, prga_en, hdr_start, hdr_capture, tx_start, tx_run;
  logic rx_sync_en, rx_data_en, ks_ready, tx_empty;
  logic sync_peak, sync_fail, rx_done, rx_err;
  logic [7:0] skip_loops;

  trx_ctrl u_ctrl (
    .clk, .rst_n, .key_load, .tx_req, .energy_det, .ks_ready, .hdr_valid,
    .tx_empty, .sync_peak, .sync_fail, .rx_done, .rx_err,
    .ksa_en, .prga_en, .skip_loops, .hdr_start, .hdr_capture, .tx_start,
    .tx_run, .rx_sync_en, .rx_data_en, .busy,
    .ev_tx_done, .ev_rx_ok, .ev_rx_drop, .ev_rx_err
  );

  // ---------------- key stream ----------------
  logic ks_i, ks_q, ks_stb;
  keystream_gen #(.KEY_BYTES(KEY_BYTES)) u_ksg (
    .clk, .rst_n, .derived_tick(chip_tick), .ksa_en, .prga_en,
    .key(secret_key), .skip_loops, .ksa_done, .ready(ks_ready),
    .ks_i, .ks_q, .ks_stb
  );

  logic [HDR_PAIRS-1:0] hdr_i, hdr_q;
  secure_header_gen u_hdr (
    .clk, .rst_n, .start(hdr_start), .capture(hdr_capture),
    .ks_stb, .ks_i, .ks_q, .hdr_i, .hdr_q, .hdr_valid
  );

  // ---------------- transmitter ----------------
  logic [7:0] fr_data;
  logic       fr_valid, fr_ready, fr_busy, fr_done;
  tx_framer u_framer (
    .clk, .rst_n, .start(tx_start), .len(tx_len),
    .mac_data(mac_tx_data), .mac_valid(mac_tx_valid), .mac_ready(mac_tx_ready),
    .out_data(fr_data), .out_valid(fr_valid), .out_ready(fr_ready),
    .busy(fr_busy), .done(fr_done)
  );

  logic [3:0] tx_sym;
  logic       tx_sym_valid, tx_sym_ready;
  bit_to_symbol u_b2s (
    .clk, .rst_n, .clr(tx_start), .byte_data(fr_data), .byte_valid(fr_valid),
    .byte_ready(fr_ready), .sym(tx_sym), .sym_valid(tx_sym_valid),
    .sym_ready(tx_sym_ready)
  );

  chipvec_t tx_chips;
  symbol_to_chip u_s2c (.sym(tx_sym), .chips(tx_chips));

  logic              tx_adv, tx_pair_valid, tx_last;
  logic signed [1:0] mod_i, mod_q, enc_i, enc_q;
  assign tx_adv = ks_stb && tx_run;
  oqpsk_mod u_mod (
    .clk, .rst_n, .clr(tx_start), .chips(tx_chips), .chips_valid(tx_sym_valid),
    .chips_ready(tx_sym_ready), .adv(tx_adv), .pair_i(mod_i), .pair_q(mod_q),
    .pair_valid(tx_pair_valid), .last(tx_last)
  );
  assign tx_empty = !fr_busy && !tx_sym_valid && !tx_pair_valid;

  phase_rotator #(.W(2)) u_enc (
    .in_i(mod_i), .in_q(mod_q), .key_a(ks_i), .key_b(ks_q),
    .out_i(enc_i), .out_q(enc_q)
  );

  half_sine_shaper #(.SW(SW)) u_shape (
    .clk, .rst_n, .stb(tx_adv && tx_pair_valid), .chip_i(enc_i), .chip_q(enc_q),
    .samp_i(tx_i), .samp_q(tx_q)
  );
  assign tx_on = tx_run;

  // ---------------- receiver ----------------
  frame_sync #(.W(W), .THRESH_Q8(THRESH_Q8)) u_sync (
    .clk, .rst_n, .en(rx_sync_en), .tick(chip_tick), .rx_i, .rx_q,
    .hdr_i, .hdr_q, .peak(sync_peak), .fail(sync_fail),
    .corr(sync_corr), .energy(sync_energy)
  );

  // sample of the current chip pair, held for the key-stream strobe
  logic signed [W-1:0] hold_i, hold_q, dec_i, dec_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_i <= '0;
      hold_q <= '0;
    end else if (chip_tick) begin
      hold_i <= rx_i;
      hold_q <= rx_q;
    end
  end

  phase_rotator #(.W(W)) u_dec (
    .in_i(hold_i), .in_q(hold_q), .key_a(ks_i), .key_b(ks_q),
    .out_i(dec_i), .out_q(dec_q)
  );

  chipvec_t rx_chips;
  logic     rx_chips_valid;
  oqpsk_demod #(.W(W)) u_demod (
    .clk, .rst_n, .clr(!rx_data_en), .stb(ks_stb && rx_data_en),
    .in_i(dec_i), .in_q(dec_q), .chips(rx_chips), .chips_valid(rx_chips_valid)
  );

  logic [3:0] rx_sym;
  logic       rx_sym_valid;
  chip_to_symbol u_c2s (
    .clk, .rst_n, .chips(rx_chips), .chips_valid(rx_chips_valid),
    .sym(rx_sym), .min_dist(rx_chip_dist), .sym_valid(rx_sym_valid)
  );

  logic [7:0] rx_byte;
  logic       rx_byte_valid;
  symbol_to_bit u_s2b (
    .clk, .rst_n, .clr(!rx_data_en), .sym(rx_sym), .sym_valid(rx_sym_valid),
    .byte_data(rx_byte), .byte_valid(rx_byte_valid)
  );

  rx_deframer u_defr (
    .clk, .rst_n, .clr(!rx_data_en), .in_data(rx_byte), .in_valid(rx_byte_valid),
    .mac_data(mac_rx_data), .mac_valid(mac_rx_valid), .frame_len(rx_len),
    .done(rx_done), .err(rx_err)
  );

  // The transmit path must never run dry in the middle of a symbol.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (tx_adv && tx_pair_valid && !tx_last && !fr_done) |=> tx_pair_valid);
endmodule
