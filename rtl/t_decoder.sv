// t_decoder: turns the correction capability t (1..TM) into the enable
// lines t1..tTM of the syndrome / encoder cell pairs.
//
// Bit k-1 of t_en (line "t<k>") is 1 when k <= t, so t = 8 gives 11111111,
// t = 7 gives 01111111 and t = 1 gives 00000001. Following the design's
// low-cost decoder, an all-ones word is shifted left t places and
// inverted: one shifter and TM inverters instead of TM comparators and a
// multiplexer. The design draws the shifter as a register shifted t times;
// here it is a combinational barrel shift, so the mask is valid in the same
// cycle as t (t = 0 gives all zeros, values above TM give all ones).
module t_decoder #(
  parameter int unsigned TM = 8                  // largest t, 8 cell pairs
) (
  input  logic [$clog2(TM+1)-1:0] t,
  output logic [TM-1:0]           t_en
);
  always_comb t_en = ~({TM{1'b1}} << t);
endmodule
