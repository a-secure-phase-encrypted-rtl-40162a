// tb_rx_deframer: good frames of random length (0 included) must be
// delivered byte for byte with the right length and one `done`; a frame
// with a wrong SFD (one nibble wrong, either nibble) must give `err` and no data.
module tb_rx_deframer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, in_valid, mac_valid, done, err;
  logic [7:0] in_data, mac_data; logic [6:0] frame_len;
  rx_deframer dut (.*);
  logic [7:0] got [128]; int ng, ndone, nerr;
  always @(posedge clk) begin
    if (mac_valid) begin got[ng] <= mac_data; ng <= ng + 1; end
    if (done) ndone <= ndone + 1;
    if (err) nerr <= nerr + 1;
  end
  task automatic put(input logic [7:0] b);
    @(negedge clk); in_data = b; in_valid = 1;
    @(negedge clk); in_valid = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask
  initial begin
    logic [7:0] p [128]; int l;
    clr = 1; in_valid = 0; in_data = 0; ng = 0; ndone = 0; nerr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 10; f++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; ng = 0; ndone = 0; nerr = 0;
      l = (f == 0) ? 0 : $urandom_range(1, 127);
      put((f == 5) ? 8'hA6 : (f == 7) ? 8'h57 : 8'hA7);
      put({1'b0, 7'(l)});
      for (int k = 0; k < l; k++) begin p[k] = 8'($urandom); put(p[k]); end
      repeat (3) @(negedge clk);
      if (f == 5 || f == 7) begin
        checks += 2;
        if (nerr != 1) begin failures++; $display("FAIL: no SFD error"); end
        if (ng != 0) begin failures++; $display("FAIL: data after bad SFD"); end
      end else begin
        checks += 3;
        if (ndone != 1 || nerr != 0) begin failures++; $display("FAIL: done %0d err %0d", ndone, nerr); end
        if (ng != l || frame_len != 7'(l)) begin failures++; $display("FAIL: %0d bytes for %0d", ng, l); end
        for (int k = 0; k < l; k++) if (got[k] != p[k]) begin failures++; $display("FAIL: byte %0d", k); break; end
      end
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
