// tb_keystream_gen: checks the loop-unrolled RC4 generator against a plain
// software RC4 (KSA, then PRGA byte by byte) for several random 16-byte
// keys. KS_I must carry key-stream bytes 0, 2, 4, ... and KS_Q bytes 1, 3,
// 5, ..., most significant bit first. Also checked: KSA_done 256 cycles
// after KSA_en; one key bit per rail per derived tick (1 Mb/s with a 1 MHz
// tick, i.e. every 16 cycles); with skip_loops = 16 the stream starts at
// byte 32; dropping both enables restarts the stream from the key.
// Long runs (6 keys x 500 bytes) use a faster tick.
module tb_keystream_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25ns clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic         derived_tick, ksa_en, prga_en, ksa_done, ready, ks_i, ks_q, ks_stb;
  logic [127:0] key;
  logic [7:0]   skip_loops;
  keystream_gen #(.KEY_BYTES(16)) dut (.*);

  int div = 0, tick_period = 16;
  always @(posedge clk) div <= (div >= tick_period - 1) ? 0 : div + 1;
  assign derived_tick = (div == 0);

  function automatic void rc4_ref(input logic [127:0] k, output logic [7:0] z [512]);
    logic [7:0] s [256];
    logic [7:0] i, j, t;
    for (int a = 0; a < 256; a++) s[a] = 8'(a);
    j = 0;
    for (int a = 0; a < 256; a++) begin
      j = j + s[a] + k[8*(a % 16) +: 8];
      t = s[a]; s[a] = s[j]; s[j] = t;
    end
    i = 0; j = 0;
    for (int n = 0; n < 512; n++) begin
      i = i + 1; j = j + s[i];
      t = s[i]; s[i] = s[j]; s[j] = t;
      z[n] = s[8'(s[i] + s[j])];
    end
  endfunction

  task automatic run(input int skip, input int nbytes_pairs);
    logic [7:0] z [512];
    logic [7:0] bi, bq;
    int t0, last_stb, cyc, nb;
    rc4_ref(key, z);
    skip_loops = 8'(skip);
    @(posedge clk);
    ksa_en <= 1'b1;
    t0 = 0;
    @(posedge clk);
    while (!ksa_done) begin @(posedge clk); t0++; end
    check(t0 == 256, $sformatf("KSA took %0d cycles, expected 256", t0));
    while (!ready) @(posedge clk);
    ksa_en <= 1'b0; prga_en <= 1'b1;
    nb = 0; last_stb = -1; cyc = 0;
    while (nb < nbytes_pairs) begin
      bi = '0; bq = '0;
      for (int b = 0; b < 8; b++) begin
        do begin @(posedge clk); cyc++; end while (!ks_stb);
        if (last_stb >= 0) check(cyc - last_stb == tick_period, $sformatf("strobe spacing %0d", cyc - last_stb));
        last_stb = cyc;
        bi = {bi[6:0], ks_i};
        bq = {bq[6:0], ks_q};
      end
      check(bi == z[2*skip + 2*nb],     $sformatf("KS_I byte %0d: %h vs %h", 2*skip + 2*nb, bi, z[2*skip + 2*nb]));
      check(bq == z[2*skip + 2*nb + 1], $sformatf("KS_Q byte %0d: %h vs %h", 2*skip + 2*nb + 1, bq, z[2*skip + 2*nb + 1]));
      nb++;
    end
    prga_en <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    ksa_en = 0; prga_en = 0; skip_loops = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    run(0, 12);
    run(0, 4);      // restart gives the same stream again
    run(16, 6);     // receiver alignment: skip the 128 header pairs
    key = {$urandom, $urandom, $urandom, $urandom};
    run(0, 8);
    // long streams with a faster tick, to reach the rare cases where the
    // output address of Z1 or Z2 hits a just-swapped entry
    tick_period = 2;
    repeat (6) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      run(0, 250);
    end
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
