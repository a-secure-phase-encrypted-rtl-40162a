// tb_tx_framer: frames of random length with random MAC and output
// stalls; the byte stream must be 00 00 00 00 A7 len PSDU..., the MAC must
// be asked for exactly `len` bytes, and `done` must follow the last byte.
module tb_tx_framer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, mac_valid, mac_ready, out_valid, out_ready, busy, done;
  logic [6:0] len; logic [7:0] mac_data, out_data;
  tx_framer dut (.*);
  logic [7:0] psdu [128];
  int nm, no;
  assign mac_data = psdu[nm];
  always @(posedge clk) begin
    if (mac_valid && mac_ready) nm <= nm + 1;
  end
  always @(negedge clk) begin
    mac_valid <= ($urandom_range(3) != 0);
    out_ready <= ($urandom_range(2) != 0);
  end
  initial begin
    int l;
    logic [7:0] exp_b;
    start = 0; len = 0; mac_valid = 0; out_ready = 0; nm = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      l = (f == 0) ? 0 : (f == 1) ? 127 : $urandom_range(1, 60);
      foreach (psdu[k]) psdu[k] = 8'($urandom);
      @(negedge clk); start = 1; len = 7'(l); nm = 0; no = 0;
      @(negedge clk); start = 0;
      while (!done) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          exp_b = (no < 4) ? 8'h00 : (no == 4) ? 8'hA7 : (no == 5) ? 8'(l) : psdu[no - 6];
          checks++;
          if (out_data != exp_b) begin failures++; $display("FAIL: frame %0d byte %0d: %h vs %h", f, no, out_data, exp_b); end
          no++;
        end
        #1;
      end
      checks += 2;
      if (no != l + 6) begin failures++; $display("FAIL: %0d bytes for length %0d", no, l); end
      if (nm != l) begin failures++; $display("FAIL: %0d MAC bytes for length %0d", nm, l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
