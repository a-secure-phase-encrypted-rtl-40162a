// tb_trx_ctrl: walks the controller through key load, a transmission, a
// receive that finds the header, a receive that does not, an SFD error
// and the refusal of frames before a header exists, checking KSA_en,
// PRGA_en, the header skip and the enables of each phase at every step.
module tb_trx_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic key_load, tx_req, energy_det, ks_ready, hdr_valid, tx_empty, sync_peak, sync_fail, rx_done, rx_err;
  logic ksa_en, prga_en, hdr_start, hdr_capture, tx_start, tx_run, rx_sync_en, rx_data_en, busy;
  logic ev_tx_done, ev_rx_ok, ev_rx_drop, ev_rx_err;
  logic [7:0] skip_loops;
  trx_ctrl dut (.*);

  task automatic step; @(negedge clk); endtask

  initial begin
    {key_load, tx_req, energy_det, ks_ready, hdr_valid, tx_empty, sync_peak, sync_fail, rx_done, rx_err} = '0;
    repeat (2) @(posedge clk); rst_n = 1; step();
    // no header yet: requests are ignored
    tx_req = 1; energy_det = 1; step(); step();
    check(!busy && !ksa_en, "no frame before the header exists");
    tx_req = 0; energy_det = 0;
    // key load
    key_load = 1; #1; check(hdr_start, "hdr_start with key_load"); step(); key_load = 0;
    check(ksa_en && !prga_en && skip_loops == 0, "header: KSA");
    ks_ready = 1; step();
    check(prga_en && !ksa_en && hdr_capture, "header: PRGA with capture");
    hdr_valid = 1; step(); ks_ready = 0;
    check(!busy && !ksa_en && !prga_en, "header done, idle");
    // transmit
    tx_req = 1; #1; check(tx_start, "tx_start"); step(); tx_req = 0;
    check(ksa_en && !tx_run, "tx: KSA");
    step(); step(); check(ksa_en, "tx: KSA held until ready");
    ks_ready = 1; step();
    check(prga_en && tx_run && !ksa_en, "tx: PRGA and run");
    tx_empty = 1; #1; check(ev_tx_done, "tx done event"); step(); tx_empty = 0; ks_ready = 0;
    check(!busy, "tx finished");
    // receive, header found
    energy_det = 1; step();
    check(ksa_en && rx_sync_en && skip_loops == 8'd16 && !prga_en, "rx: sync with KSA and 16-loop skip");
    ks_ready = 1; step(); step();
    check(ksa_en && rx_sync_en, "rx: waiting for peak");
    sync_peak = 1; step(); sync_peak = 0;
    check(prga_en && rx_data_en && !ksa_en && !rx_sync_en, "rx: data recovery");
    rx_done = 1; #1; check(ev_rx_ok, "rx ok event"); step(); rx_done = 0;
    check(!busy && !prga_en, "rx finished");
    // receive, no header
    step(); check(rx_sync_en, "rx again while energy present");
    sync_fail = 1; #1; check(ev_rx_drop, "drop event"); step(); sync_fail = 0;
    check(!ksa_en && !prga_en && !busy, "dropped: both enables low");
    energy_det = 0; step();
    // SFD error path
    energy_det = 1; step(); energy_det = 0;
    sync_peak = 1; step(); sync_peak = 0;
    check(rx_data_en, "rx data");
    rx_err = 1; #1; check(ev_rx_err, "SFD error event"); step(); rx_err = 0;
    check(!busy, "idle after error");
    // peak before the key stream is ready is dropped
    ks_ready = 0; energy_det = 1; step(); energy_det = 0;
    sync_peak = 1; #1; check(ev_rx_drop, "early peak dropped"); step(); sync_peak = 0;
    check(!busy, "idle after early peak");
    // key load has priority over transmit
    key_load = 1; tx_req = 1; #1; check(hdr_start && !tx_start, "key load first"); step();
    key_load = 0; tx_req = 0;
    check(hdr_capture == 0 && ksa_en, "header KSA again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
