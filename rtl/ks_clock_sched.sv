// ks_clock_sched: clock selector and clock scheduler of the key-stream
// generator, written as clock enables for a single 16 MHz system clock.
//
// Clock selector: phi follows the derived chip-pair clock (1 MHz tick)
// while PRGA_en is high, the system clock (every cycle) while KSA_en is
// high, and stops otherwise; PRGA_en wins when both are high.
// Clock scheduler: CLK1 drives Circuit1, Circuit2, Circuit4 and the
// serializer, CLK3 = ~CLK1 drives Circuit3 (the swap). During PRGA CLK1 is
// phi/8, so one unrolled loop (two key-stream bytes, 8 bits per rail) is
// done per 8 phi ticks: clk1_en on phi tick 0 and clk3_en on tick 4 of
// every group of 8. While KSA_en is high and the generator is not done,
// CLK1 is phi/2: clk1_en and clk3_en alternate every cycle, one loop per
// two cycles. Once `done` is high, KSA_en alone gives no enables.
//
// The tick counter restarts at 0 whenever the selected source changes, so
// the first enable after a switch is always a CLK1. All outputs are
// combinational from the inputs and one small counter.
module ks_clock_sched (
  input  logic clk,
  input  logic rst_n,
  input  logic derived_tick,   // CLK_derived as a one-cycle strobe
  input  logic ksa_en,
  input  logic prga_en,
  input  logic done,           // KSA (and start-up loops) finished
  output logic phi_en,
  output logic clk1_en,
  output logic clk3_en
);
  typedef enum logic [1:0] {SRC_OFF, SRC_SYSTEM, SRC_DERIVED} src_e;

  src_e       src, src_q;
  logic [2:0] cnt_q, cnt;

  always_comb begin
    if (prga_en)               src = SRC_DERIVED;
    else if (ksa_en && !done)  src = SRC_SYSTEM;
    else                       src = SRC_OFF;
    cnt = (src != src_q) ? 3'd0 : cnt_q;
    unique case (src)
      SRC_DERIVED: phi_en = derived_tick;
      SRC_SYSTEM:  phi_en = 1'b1;
      default:     phi_en = 1'b0;
    endcase
    if (src == SRC_DERIVED) begin
      clk1_en = phi_en && (cnt == 3'd0);
      clk3_en = phi_en && (cnt == 3'd4);
    end else begin
      clk1_en = phi_en && !cnt[0];
      clk3_en = phi_en &&  cnt[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= SRC_OFF;
      cnt_q <= '0;
    end else begin
      src_q <= src;
      if (phi_en) cnt_q <= (src == SRC_DERIVED) ? cnt + 3'd1 : {2'b00, ~cnt[0]};
      else        cnt_q <= cnt;
    end
  end
endmodule
