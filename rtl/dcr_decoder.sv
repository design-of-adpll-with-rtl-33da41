// dcr_decoder: turns the 10-bit oscillator code into the row and column
// thermometer codes of the digitally controlled resistor (DCR) array.
//
// The code is split with one bit of overlap: code[9:5] gives the row code and
// code[5:0] the column code. The row code has code[9:5] ones filled from the
// LSB. The column code has code[4:0] ones from the LSB while code[5] is 0, and
// while code[5] is 1 it starts from all ones and clears code[4:0] bits from
// the LSB. So 6'b011111 and 6'b100000 both give 31'h7FFFFFFF, and across the
// whole 0..1023 range one step of the code changes exactly one of the 62
// outputs; with odd rows (counted from 1) taking their cells from a column
// bit of 1 and even rows from a column bit of 0, the array turns its cells on
// in one snake-like order. This split and mapping follow the thesis. Purely combinational.
module dcr_decoder
  import adpll_pkg::*;
(
  input  logic [CODE_W-1:0]  code,
  output logic [THERM_W-1:0] row,
  output logic [THERM_W-1:0] col
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [4:0] row_n;    // number of ones in the row code
  logic [4:0] col_n;    // number of ones (code[5]=0) or zeros (code[5]=1) in the column code

  assign row_n = code[9:5];
  assign col_n = code[4:0];

  always_comb begin
    for (int i = 0; i < THERM_W; i++) begin
      row[i] = (i < int'(row_n));
      col[i] = code[5] ? (i >= int'(col_n)) : (i < int'(col_n));
    end
  end

endmodule
