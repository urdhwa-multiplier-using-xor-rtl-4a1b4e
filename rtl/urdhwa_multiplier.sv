// Unsigned WIDTH x WIDTH multiplier on the vertical-and-crosswise
// (Urdhva Tiryagbhyam) scheme, with compressors doing the column sums.
//
// Vertical and crosswise: bit j of the product comes from column j, the
// crosswise products a[i] & b[j-i] for every i that fits, plus whatever
// the lower columns carry into it. All columns are formed at once; the
// work is in adding them without a long carry chain. Here that is done in
// three steps, all combinational:
//
//   1. Each column j puts up to seven of its products through a 7:2
//      compressor. Its cin1/cin2 are the cout1/cout2 of column j-2
//      (weight 4 there, weight 1 here). Result: s1[j] in column j and
//      c1[j] in column j+1.
//   2. Each column then holds at most three bits: s1[j], c1[j-1] and, in
//      the middle column of an 8-bit multiplier, the eighth product the
//      7:2 compressor had no room for. A 4:2 compressor adds them, with
//      its cin from the cout of column j-1. Result: two rows, s2 and c2.
//   3. One carry-propagate adder adds s2 and c2 << 1.
//
// The compressors of the two steps and the column-wise product scheme
// follow the published multiplier. The published text gives neither the
// operand width nor how the compressors are arranged into a multiplier,
// nor the final adder; the width of 8, the two-step arrangement above
// and the plain adder of step 3 are this design's choices. A column holds
// at most WIDTH products and step 1 takes seven, step 2 one more, so
// WIDTH is limited to 2..8.
//
// Two extra columns above the product absorb carries that leave the top
// column; because a*b < 2**(2*WIDTH) their bits are always zero.
//
// Interface: a, b in; p = a * b out, combinational, no clock.
module urdhwa_multiplier #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NCOL = 2 * WIDTH + 2;

  if (WIDTH < 2 || WIDTH > 8) begin : g_width_check
    $error("urdhwa_multiplier: WIDTH must be 2..8");
  end

  // Crosswise products, column by column; entry k of column j is
  // a[lo+k] & b[j-lo-k] with lo = max(0, j-WIDTH+1). Unused entries are 0.
  logic [7:0] pp [NCOL];

  always_comb begin
    for (int j = 0; j < NCOL; j++) begin
      pp[j] = '0;
      for (int i = 0; i < int'(WIDTH); i++) begin
        if (j - i >= 0 && j - i < int'(WIDTH)) begin
          pp[j][i - ((j - int'(WIDTH) + 1) > 0 ? (j - int'(WIDTH) + 1) : 0)] = a[i] & b[j-i];
        end
      end
    end
  end

  // Step 1: one 7:2 compressor per column.
  logic [NCOL-1:0] s1, c1, co1, co2;
  // Step 2: one 4:2 compressor per column.
  logic [NCOL-1:0] s2, c2, co;

  for (genvar j = 0; j < NCOL; j++) begin : g_col
    logic cin1, cin2;
    logic [3:0] x42;
    logic cin42;

    if (j >= 2) begin : g_cin7
      assign cin1 = co1[j-2];
      assign cin2 = co2[j-2];
    end else begin : g_cin7_0
      assign cin1 = 1'b0;
      assign cin2 = 1'b0;
    end

    compressor_7_2 u_c72 (
      .x    (pp[j][6:0]),
      .cin1 (cin1),
      .cin2 (cin2),
      .sum  (s1[j]),
      .carry(c1[j]),
      .cout1(co1[j]),
      .cout2(co2[j])
    );

    if (j >= 1) begin : g_in42
      assign x42   = {1'b0, pp[j][7], c1[j-1], s1[j]};
      assign cin42 = co[j-1];
    end else begin : g_in42_0
      assign x42   = {1'b0, pp[j][7], 1'b0, s1[j]};
      assign cin42 = 1'b0;
    end

    compressor_4_2 u_c42 (
      .x    (x42),
      .cin  (cin42),
      .sum  (s2[j]),
      .carry(c2[j]),
      .cout (co[j])
    );
  end

  // Step 3: carry-propagate addition of the two remaining rows.
  logic [NCOL-1:0] total;
  always_comb total = s2 + {c2[NCOL-2:0], 1'b0};
  assign p = total[2*WIDTH-1:0];

  // The bits above the product, and what falls off the top column, are
  // zero for every input.
  logic unused_hi;
  always_comb unused_hi = ^{total[NCOL-1:2*WIDTH], c1[NCOL-1], c2[NCOL-1], co[NCOL-1],
                            co1[NCOL-1:NCOL-2], co2[NCOL-1:NCOL-2]};
endmodule
