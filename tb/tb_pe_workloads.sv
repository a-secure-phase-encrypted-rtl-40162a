// tb_pe_workloads: the operating points at which the transceiver is
// evaluated, run on the full design at its default parameters.
//
//   1. Five frames in a row at an SNR of 3 dB per rail (Gaussian noise,
//      standard deviation 64/sqrt(2) around a peak level of 64). The
//      legitimate receiver B must find every header with a normalised
//      correlation peak (corr / energy) well above the 0.5 threshold; the
//      adversary C, holding another key, must find none and stays far
//      below it. The averages are printed.
//   2. One maximum-length frame (127-byte PSDU) on a clean channel: every
//      byte must arrive, and the chip-decision distance of every symbol
//      must be zero. The receive latency, from the first chip pair on air
//      to the header peak, must be the 128-pair preamble, 128 us.
// The channel and node set-up are those of the end-to-end test.
module tb_pe_workloads;
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
  // Approximately Gaussian: sum of 12 uniform values on [-0.5, 0.5),
  // scaled by the standard deviation noise_amp.
  function automatic int noise();
    int acc;
    if (noise_amp == 0) return 0;
    acc = 0;
    for (int k = 0; k < 12; k++) acc += int'($urandom_range(1023)) - 512;
    return (acc * noise_amp) / 1024;
  endfunction
  always @(posedge clk) begin
    if (tick_a) phase <= 0; else phase <= phase + 1;
    if (phase == 9)  pk_i <= 10'(src_i) >>> 1;   // channel gain 1/2
    if (phase == 1)  pk_q <= 10'(src_q) >>> 1;   // Q peak of the previous pair
    if (phase == 2) begin
      ch_i <= clip(int'(pk_i) + noise());
      ch_q <= clip(int'(pk_q) + noise());
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // KSA duration of A, measured from KSA_en to KSA_done
  int ksa_cycles;
  int on_air_t, peak_t, cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if ((a_on || c_on) && on_air_t < 0) on_air_t <= cyc;
    if (dut_b.u_sync.peak && peak_t < 0) peak_t <= cyc;
  end

  task automatic send_frame(input bit from_c, input int len, input int noise_level,
                            input bit expect_b_ok, output int tx_latency,
                            output int byte_err);
    int t0, t1, n;
    noise_amp   = noise_level;
    send_from_c = from_c;
    pidx        = 0;
    nrx_b       = 0;
    nrx_c       = 0;
    for (int k = 0; k < len; k++) payload[k] = 8'($urandom);
    on_air_t    = -1;
    peak_t      = -1;
    byte_err    = 0;
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
      for (int k = 0; k < len; k++) if (k >= nrx_b || got[k] != payload[k]) n++;
      byte_err = n;
    end
  endtask

  int lat, drops_b, drops_c, b_peaks, berr;
  int b_pk_corr, b_pk_en, c_max_corr, c_max_en;
  always @(posedge clk) begin
    if (b_dr) drops_b <= drops_b + 1;
    if (c_dr) drops_c <= drops_c + 1;
    // the energy detector reports once per burst
    if (b_dr || b_ok || b_er) en_b <= 1'b0;
    if (c_dr || c_ok || c_er) en_c <= 1'b0;
    if (dut_b.u_sync.peak) begin b_pk_corr <= int'(b_corr); b_pk_en <= int'(b_en); b_peaks <= b_peaks + 1; end
    if (dut_c.u_sync.calc_q && dut_c.u_sync.fill_q >= 128 && int'(dut_c.u_sync.corr_c) > c_max_corr) begin
      c_max_corr <= int'(dut_c.u_sync.corr_c);
      c_max_en   <= int'(dut_c.u_sync.energy_c);
    end
  end

  initial begin
    real b_norm, c_norm, b_sum, c_sum, c_worst;
    int  errs, dist_bad;
    key_load = 0; tx_req_a = 0; tx_req_c = 0; tx_len = 0; en_b = 0; en_c = 0;
    b_pk_corr = 0; b_pk_en = 0; c_max_corr = 0; c_max_en = 0; b_peaks = 0;
    send_from_c = 0; pidx = 0; noise_amp = 0; phase = 0; nrx_b = 0; nrx_c = 0;
    ch_i = 0; ch_q = 0; pk_i = 0; pk_q = 0; drops_b = 0; drops_c = 0; cyc = 0;
    on_air_t = -1; peak_t = -1;
    wait_cycles(5);
    rst_n = 1'b1;
    wait_cycles(5);
    key_load = 1'b1; @(posedge clk); key_load = 1'b0;
    wait (a_hv && b_hv && c_hv);
    wait_cycles(20);

    // ---- workload 1: five frames at 3 dB SNR
    b_sum = 0.0; c_sum = 0.0; c_worst = 0.0; errs = 0;
    for (int f = 0; f < 5; f++) begin
      b_peaks = 0; c_max_corr = 0; c_max_en = 1;
      send_frame(1'b0, 10, 45, 1'b1, lat, berr);
      check(b_peaks == 1, $sformatf("3 dB frame %0d: B finds the header", f));
      b_norm = (b_pk_en > 0) ? real'(b_pk_corr) / real'(b_pk_en) : 0.0;
      c_norm = real'(c_max_corr) / real'(c_max_en);
      check(b_norm >= 0.6, $sformatf("3 dB frame %0d: B peak %0.3f", f, b_norm));
      check(c_norm < 0.4, $sformatf("3 dB frame %0d: C best %0.3f", f, c_norm));
      check(drops_c == f + 1, $sformatf("3 dB frame %0d: C drops the frame", f));
      b_sum += b_norm; c_sum += c_norm;
      if (c_norm > c_worst) c_worst = c_norm;
      errs += berr;
    end
    $display("3 dB: B mean normalised peak %0.3f, C mean best %0.3f (worst %0.3f), B byte errors %0d of 50",
             b_sum / 5.0, c_sum / 5.0, c_worst, errs);
    check(errs <= 2, $sformatf("3 dB: %0d byte errors at B", errs));

    // ---- workload 2: maximum frame, clean channel, receive latency
    dist_bad = 0;
    fork
      begin
        forever begin
          @(posedge clk);
          if (dut_b.rx_sym_valid && b_dist != 6'd0) dist_bad++;
        end
      end
      send_frame(1'b0, 127, 0, 1'b1, lat, berr);
    join_any
    disable fork;
    check(nrx_b == 127 && berr == 0, $sformatf("127-byte frame: %0d bytes, %0d wrong", nrx_b, berr));
    check(b_len == 7'd127, "127-byte frame: length field");
    check(dist_bad == 0, $sformatf("127-byte frame: %0d symbols with nonzero distance", dist_bad));
    check(peak_t - on_air_t >= 2048 && peak_t - on_air_t <= 2048 + 32,
          $sformatf("receive sync latency %0d cycles (%0.2f us)", peak_t - on_air_t,
                    (peak_t - on_air_t) / 16.0));
    $display("127-byte frame: receive sync latency %0d cycles (%0.2f us), tx latency %0d cycles",
             peak_t - on_air_t, (peak_t - on_air_t) / 16.0, lat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
