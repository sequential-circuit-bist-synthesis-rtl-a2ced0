// clock_divider: source of the two clock-derived signals for the holder.
//
// A binary counter of ceil(log2(2*D)) bits runs on the system clock. Its bit
// log2(H_L)-1 is a square wave of period H_L system clocks (derived clock 1)
// and its top bit a square wave of period 2*D (derived clock 2), low for the
// first D cycles of each period and high for the next D. H_L and D are powers
// of two with 2 <= H_L <= D.
//
// Interface: clk, active-low asynchronous reset rst_n (counter to 0),
// outputs div_hl and div_2d, both registered. The counter widths and division
// ratios follow the method; it counts synchronously here, where the method
// builds it as a ripple counter, so that every flip-flop shares one clock.
module clock_divider #(
  parameter int unsigned D   = 4,
  parameter int unsigned H_L = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic div_hl,
  output logic div_2d
);

  localparam int unsigned CW = $clog2(2 * D);
  localparam int unsigned HB = $clog2(H_L);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign div_hl = cnt[HB-1];
  assign div_2d = cnt[CW-1];

  initial begin
    assert ((D & (D - 1)) == 0 && (H_L & (H_L - 1)) == 0 && H_L >= 2 && H_L <= D)
      else $error("clock_divider: D and H_L must be powers of two, 2 <= H_L <= D");
  end

endmodule
