// hadamard_wave_gen: Walsh function generator of order N.
//
// Produces all 2^N Walsh functions (the rows of the Hadamard matrix H(N)) as
// parallel bit-streams, one new column per BIST clock. As in the counter-based
// generator the method uses, the hardware is an N-bit binary counter plus
// 2^N - N - 1 two-input XOR gates: output 0 is the constant 0, output 2^k is
// counter bit k, and every other output r is the XOR of two outputs already
// built, r with its lowest set bit cleared and that lowest bit alone.
//
// Row order and polarity: wal[r] = parity(r & t), where t is the counter
// value, which is row r of the Sylvester-ordered H(N) used for the spectral
// analysis, column t. Logic 0 stands for +1 and logic 1 for -1, so wal[0] is
// the constant 0 as in the order-4 generator drawing. Callers that want the
// analysis convention (1 = +1) invert the row.
//
// Interface: clk, active-low asynchronous reset rst_n (counter to 0), and
// adv, a clock enable that plays the role of the BIST clock: the counter
// advances at a rising edge of clk where adv is 1. wal is combinational from
// the counter, so a new column appears one cycle after adv.
//
// This design uses a synchronous counter with an enable in place of a
// counter clocked by a separate BIST clock; the rest follows the method.
module hadamard_wave_gen #(
  parameter int unsigned N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,
  output logic [(1<<N)-1:0] wal
);

  localparam int unsigned ROWS = 1 << N;

  logic [N-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   t <= '0;
    else if (adv) t <= t + 1'b1;
  end

  assign wal[0] = 1'b0;

  for (genvar r = 1; r < ROWS; r++) begin : g_row
    localparam int unsigned LOW  = r & (~r + 1);   // lowest set bit of r
    localparam int unsigned REST = r & (r - 1);    // r without that bit
    if (REST == 0) begin : g_bit
      assign wal[r] = t[$clog2(LOW)];
    end else begin : g_xor
      assign wal[r] = wal[REST] ^ wal[LOW];
    end
  end

endmodule
