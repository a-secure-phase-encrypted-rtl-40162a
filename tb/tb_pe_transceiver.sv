// tb_pe_transceiver: end-to-end test of the phase-encrypted transceiver at
// its default parameters.
//
// Three transceivers share one clock: A (legitimate sender) and B
// (legitimate receiver) hold the same secret key, C (adversary) holds a
// different one. The channel samples A's half-sine I/Q waveform at the
// pulse peaks, optionally adds noise, and hands one soft sample per rail
// per chip pair to both receivers. Checked:
//   - KSA takes 256 system-clock cycles; the air signal starts within
//     KSA time plus a few cycles of the transmit request (about 16 us);
//   - B recovers every PSDU byte of every frame, with and without noise;
//   - C never finds the header and drops each frame (ev_rx_drop);
//   - a frame sent by C with its own key is dropped by B before any data
//     recovery (bogus frame / energy depletion case);
//   - channel energy with no frame in it is dropped after the search window.
// Each of these mechanisms is counted and must occur at least once.
module tb_pe_transceiver;
  import pe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25ns clk = ~clk;   // 16 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- devices ----------------
  localparam logic [127:0] KEY_AB = 128'h0F0E0D0C0B0A09080706050403020100;
  localparam logic [127:0] KEY_C  = 128'h1122334455667788_99AABBCCDDEEFF00;

  logic        key_load;
  logic        tx_req_a, tx_req_c;
  logic [6:0]  tx_len;
  logic [7:0]  mac_a_data, mac_c_data;
  logic        mac_a_valid, mac_c_valid, mac_a_ready, mac_c_ready;
  logic signed [7:0] a_ti, a_tq, c_ti, c_tq, b_ti, b_tq;
  logic        a_on, b_on, c_on;
  logic        tick_a, tick_b, tick_c;
  logic        en_b, en_c;
  logic signed [7:0] ch_i, ch_q;
  logic [7:0]  b_rx_data, c_rx_data, a_rx_data;
  logic        b_rx_valid, c_rx_valid, a_rx_valid;
  logic [6:0]  b_len, c_len, a_len;
  logic [5:0]  b_dist, c_dist, a_dist;
  logic        a_hv, b_hv, c_hv, a_kd, b_kd, c_kd;
  logic        a_busy, b_busy, c_busy;
  logic        a_txd, b_txd, c_txd, a_ok, b_ok, c_ok, a_dr, b_dr, c_dr, a_er, b_er, c_er;
  logic signed [17:0] a_corr, b_corr, c_corr;
  logic [17:0] a_en, b_en, c_en;

  pe_transceiver dut_a (
    .clk, .rst_n, .secret_key(KEY_AB), .key_load, .hdr_valid(a_hv), .ksa_done(a_kd),
    .tx_req(tx_req_a), .tx_len, .mac_tx_data(mac_a_data), .mac_tx_valid(mac_a_valid),
    .mac_tx_ready(mac_a_ready), .tx_i(a_ti), .tx_q(a_tq), .tx_on(a_on),
    .chip_tick(tick_a), .energy_det(1'b0), .rx_i(8'sd0), .rx_q(8'sd0),
    .mac_rx_data(a_rx_data), .mac_rx_valid(a_rx_valid), .rx_len(a_len), .rx_chip_dist(a_dist),
    .busy(a_busy), .ev_tx_done(a_txd), .ev_rx_ok(a_ok), .ev_rx_drop(a_dr), .ev_rx_err(a_er),
    .sync_corr(a_corr), .sync_energy(a_en)
  );
  pe_transceiver dut_b (
    .clk, .rst_n, .secret_key(KEY_AB), .key_load, .hdr_valid(b_hv), .ksa_done(b_kd),
    .tx_req(1'b0), .tx_len, .mac_tx_data(8'h00), .mac_tx_valid(1'b0),
    .mac_tx_ready(), .tx_i(b_ti), .tx_q(b_tq), .tx_on(b_on),
    .chip_tick(tick_b), .energy_det(en_b), .rx_i(ch_i), .rx_q(ch_q),
    .mac_rx_data(b_rx_data), .mac_rx_valid(b_rx_valid), .rx_len(b_len), .rx_chip_dist(b_dist),
    .busy(b_busy), .ev_tx_done(b_txd), .ev_rx_ok(b_ok), .ev_rx_drop(b_dr), .ev_rx_err(b_er),
    .sync_corr(b_corr), .sync_energy(b_en)
  );
  pe_transceiver dut_c (
    .clk, .rst_n, .secret_key(KEY_C), .key_load, .hdr_valid(c_hv), .ksa_done(c_kd),
    .tx_req(tx_req_c), .tx_len, .mac_tx_data(mac_c_data), .mac_tx_valid(mac_c_valid),
    .mac_tx_ready(mac_c_ready), .tx_i(c_ti), .tx_q(c_tq), .tx_on(c_on),
    .chip_tick(tick_c), .energy_det(en_c), .rx_i(ch_i), .rx_q(ch_q),
    .mac_rx_data(c_rx_data), .mac_rx_valid(c_rx_valid), .rx_len(c_len), .rx_chip_dist(c_dist),
    .busy(c_busy), .ev_tx_done(c_txd), .ev_rx_ok(c_ok), .ev_rx_drop(c_dr), .ev_rx_err(c_er),
    .sync_corr(c_corr), .sync_energy(c_en)
  );

  // ---------------- MAC models ----------------
  logic [7:0] payload [128];
  int         pidx;
  logic       send_from_c;
  assign mac_a_data  = payload[pidx];
  assign mac_c_data  = payload[pidx];
  assign mac_a_valid = !send_from_c;
  assign mac_c_valid = send_from_c;
  always @(posedge clk) begin
    if ((mac_a_valid && mac_a_ready) || (mac_c_valid && mac_c_ready)) pidx <= pidx + 1;
  end

  logic [7:0] got [128];
  int         nrx_b, nrx_c;
  always @(posedge clk) begin
    if (b_rx_valid) begin got[nrx_b] <= b_rx_data; nrx_b <= nrx_b + 1; end
    if (c_rx_valid) nrx_c <= nrx_c + 1;
  end

  // ---------------- channel ----------------
  // Pulse peaks: I of a pair 10 cycles after its chip tick, Q 18 cycles after.
  int   noise_amp;
  logic signed [7:0] src_i, src_q;
  logic signed [9:0] pk_i, pk_q;
  int   phase;
  assign src_i = send_from_c ? c_ti : a_ti;
  assign src_q = send_from_c ? c_tq : a_tq;
  function automatic logic signed [7:0] clip(input int v);
    if (v > 127) return 8'sd127;
    if (v < -127) return -8'sd127;
    return 8'(v);
  endfunction
  function automatic int noise();
    if (noise_amp == 0) return 0;
    return int'($urandom_range(2*noise_amp)) - noise_amp;
  endfunction
  always @(posedge clk) begin
    if (tick_a) phase <= 0; else phase <= phase + 1;
    if (phase == 9)  pk_i <= 10'(src_i);
    if (phase == 1)  pk_q <= 10'(src_q);   // Q peak of the previous pair
    if (phase == 2) begin
      ch_i <= clip(int'(pk_i) + noise());
      ch_q <= clip(int'(pk_q) + noise());
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hdr = 0, n_ksa = 0, n_fast = 0, n_derived = 0, n_skip = 0;
  int n_tx = 0, n_ok = 0, n_adv_drop = 0, n_ghost_drop = 0, n_noise_drop = 0;
  logic a_kd_q = 0;
  always @(posedge clk) begin
    a_kd_q <= a_kd;
    if (a_kd && !a_kd_q) n_ksa++;
    if (dut_a.u_ksg.u_sched.src == 2'd1) n_fast++;
    if (dut_a.u_ksg.u_sched.src == 2'd2 && dut_a.u_ksg.u_sched.phi_en) n_derived++;
    if (dut_b.u_ksg.skip_loops != 0 && dut_b.u_ksg.ready && !dut_b.u_ksg.prga_en) n_skip++;
    if (a_txd) n_tx++;
    if (b_ok)  n_ok++;
  end

  // ---------------- helpers ----------------
  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // KSA duration of A, measured from KSA_en to KSA_done
  int ksa_cycles;
  task automatic send_frame(input bit from_c, input int len, input int noise_level,
                            input bit expect_b_ok, output int tx_latency);
    int t0, t1, n;
    noise_amp   = noise_level;
    send_from_c = from_c;
    pidx        = 0;
    nrx_b       = 0;
    nrx_c       = 0;
    for (int k = 0; k < len; k++) payload[k] = 8'($urandom);
    tx_len = 7'(len);
    @(posedge clk);
    if (from_c) tx_req_c <= 1'b1; else tx_req_a <= 1'b1;
    @(posedge clk);
    tx_req_a <= 1'b0; tx_req_c <= 1'b0;
    t0 = 0;
    // count cycles until the transmitter is on air; measure KSA on the way
    ksa_cycles = 0;
    while (!(from_c ? c_on : a_on)) begin
      @(posedge clk);
      t0++;
      if (!from_c && dut_a.u_ksg.ksa_en && !a_kd) ksa_cycles++;
    end
    tx_latency = t0;
    if (from_c) en_b <= 1'b1; else begin en_b <= 1'b1; en_c <= 1'b1; end
    // wait for the end of transmission and of reception
    t1 = 0;
    while ((from_c ? c_busy : a_busy) || b_busy || c_busy) begin
      @(posedge clk);
      t1++;
      if (t1 > 200000) break;
    end
    en_b <= 1'b0; en_c <= 1'b0;
    wait_cycles(40);
    if (expect_b_ok) begin
      n = 0;
      check(nrx_b == len, $sformatf("B got %0d of %0d bytes", nrx_b, len));
      for (int k = 0; k < len; k++) if (got[k] != payload[k]) n++;
      check(n == 0, $sformatf("B payload mismatches: %0d", n));
      check(b_len == 7'(len), "B frame length");
    end else begin
      check(nrx_b == 0, "B must not deliver a bogus frame");
    end
  endtask

  int lat, drops_b, drops_c;
  int b_pk_corr, b_pk_en, c_max_corr, c_max_en;
  always @(posedge clk) begin
    if (b_dr) drops_b <= drops_b + 1;
    if (c_dr) drops_c <= drops_c + 1;
    // the energy detector reports once per burst
    if (b_dr || b_ok || b_er) en_b <= 1'b0;
    if (c_dr || c_ok || c_er) en_c <= 1'b0;
    if (dut_b.u_sync.peak) begin b_pk_corr <= int'(b_corr); b_pk_en <= int'(b_en); end
    if (dut_c.u_sync.calc_q && dut_c.u_sync.fill_q >= 128 && int'(dut_c.u_sync.corr_c) > c_max_corr) begin
      c_max_corr <= int'(dut_c.u_sync.corr_c);
      c_max_en   <= int'(dut_c.u_sync.energy_c);
    end
  end

  initial begin
    key_load = 0; tx_req_a = 0; tx_req_c = 0; tx_len = 0; en_b = 0; en_c = 0;
    b_pk_corr = 0; b_pk_en = 0; c_max_corr = 0; c_max_en = 0;
    send_from_c = 0; pidx = 0; noise_amp = 0; phase = 0; nrx_b = 0; nrx_c = 0;
    ch_i = 0; ch_q = 0; pk_i = 0; pk_q = 0; drops_b = 0; drops_c = 0;
    wait_cycles(5);
    rst_n = 1'b1;
    wait_cycles(5);
    // ---- key load / secure header generation on all three nodes
    key_load = 1'b1; @(posedge clk); key_load = 1'b0;
    wait (a_hv && b_hv && c_hv);
    n_hdr += 3;
    check(dut_a.u_hdr.hdr_i == dut_b.u_hdr.hdr_i && dut_a.u_hdr.hdr_q == dut_b.u_hdr.hdr_q,
          "A and B build the same secure header");
    check(dut_a.u_hdr.hdr_i != dut_c.u_hdr.hdr_i, "C's header differs");
    wait_cycles(20);

    // ---- frame 1: clean channel
    send_frame(1'b0, 10, 0, 1'b1, lat);
    check(ksa_cycles == 256, $sformatf("KSA cycles %0d, expected 256", ksa_cycles));
    check(lat >= 256 && lat <= 300, $sformatf("transmit start latency %0d cycles", lat));
    $display("frame 1: tx latency %0d cycles (%0.2f us), B corr %0d / %0d, C corr %0d / %0d",
             lat, lat / 16.0, b_pk_corr, b_pk_en, c_max_corr, c_max_en);
    check(drops_c == 1, "adversary C drops frame 1");
    if (drops_c == 1) n_adv_drop++;

    // ---- frame 2: noisy channel, longer frame
    send_frame(1'b0, 40, 60, 1'b1, lat);
    check(drops_c == 2, "adversary C drops frame 2");
    if (drops_c == 2) n_adv_drop++;

    // ---- frame 3: ghost attacker C sends with its own key; B must drop it
    send_frame(1'b1, 20, 0, 1'b0, lat);
    check(drops_b == 1, "B drops the bogus frame from C");
    if (drops_b == 1) n_ghost_drop++;

    // ---- energy with only noise in the channel
    noise_amp = 100; send_from_c = 0;
    en_b <= 1'b1;
    wait (b_dr);
    @(posedge clk); en_b <= 1'b0;
    wait_cycles(40);
    check(drops_b == 2, "B drops a noise-only detection");
    if (drops_b == 2) n_noise_drop++;

    // ---- frame 4: one-byte PSDU
    send_frame(1'b0, 1, 0, 1'b1, lat);

    $display("mechanisms: hdr=%0d ksa=%0d fast_phi=%0d derived_phi=%0d skip=%0d tx=%0d rx_ok=%0d adv_drop=%0d ghost_drop=%0d noise_drop=%0d",
             n_hdr, n_ksa, n_fast, n_derived, n_skip, n_tx, n_ok, n_adv_drop, n_ghost_drop, n_noise_drop);
    check(n_hdr > 0, "header generation happened");
    check(n_ksa > 0, "KSA happened");
    check(n_fast > 0, "system-clock phi happened");
    check(n_derived > 0, "derived-clock phi happened");
    check(n_skip > 0, "receiver header-skip happened");
    check(n_tx > 0, "transmission happened");
    check(n_ok > 0, "legitimate reception happened");
    check(n_adv_drop > 0, "adversary drop happened");
    check(n_ghost_drop > 0, "bogus-frame drop happened");
    check(n_noise_drop > 0, "noise-only drop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
