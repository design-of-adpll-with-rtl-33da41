// tb_dcr_decoder: exhaustive test of the 10-bit code to row/column
// thermometer decoder. For every code the expected codes are built
// independently: the row code has floor(code/32) ones; the column code is
// taken from the published mapping (6'b000000 -> 0, 6'b000001 -> 1,
// 6'b000010 -> 3, 6'b011111 and 6'b100000 -> 7FFFFFFF, 6'b100001 -> 7FFFFFFE,
// 6'b100010 -> 7FFFFFFC, ...). It also checks that the number of cells the
// array turns on equals the code and that consecutive codes differ in
// exactly one of the 62 output bits.
module tb_dcr_decoder;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic [CODE_W-1:0]  code;
  logic [THERM_W-1:0] row, col, prev_row, prev_col;
  int checks = 0, failures = 0;

  dcr_decoder dut (.code, .row, .col);

  function automatic logic [30:0] exp_col(int c6);
    logic [30:0] all1;
    all1 = 31'h7FFF_FFFF;
    if (c6 < 32) return (31'(1) << c6) - 31'(1);          // c6 ones from the LSB
    else         return all1 & ~((31'(1) << (c6 - 32)) - 31'(1));  // (c6-32) zeros from the LSB
  endfunction

  initial begin
    // Spot checks against the printed table.
    int tbl_in [7] = '{0, 1, 2, 3, 31, 32, 33};
    logic [30:0] tbl_out [7] = '{31'h0, 31'h1, 31'h3, 31'h7, 31'h7FFF_FFFF, 31'h7FFF_FFFF, 31'h7FFF_FFFE};
    for (int i = 0; i < 7; i++) begin
      code = 10'(tbl_in[i]);
      #1;
      checks++;
      if (col != tbl_out[i]) begin
        failures++; $display("table: code %0d col=%h expected %h", tbl_in[i], col, tbl_out[i]);
      end
    end
    code = 10'd34; #1; checks++;
    if (col != 31'h7FFF_FFFC) begin failures++; $display("table: code 34 col=%h", col); end

    for (int c = 0; c < 1024; c++) begin
      int nr, nc, cells;
      code = 10'(c);
      #1;
      checks++;
      if (row != (31'(1) << (c / 32)) - 31'(1) && !(c / 32 == 31 && row == 31'h7FFF_FFFF)) begin
        failures++; $display("code %0d row=%h", c, row);
      end
      checks++;
      if (col != exp_col(c % 64)) begin
        failures++; $display("code %0d col=%h expected %h", c, col, exp_col(c % 64));
      end
      nr = $countones(row); nc = $countones(col);
      cells = 32 * nr + ((nr % 2 == 1) ? 31 - nc : nc);
      checks++;
      if (cells != c) begin failures++; $display("code %0d turns on %0d cells", c, cells); end
      if (c > 0) begin
        checks++;
        if ($countones({row ^ prev_row, col ^ prev_col}) != 1) begin
          failures++; $display("code %0d: more than one bit changed", c);
        end
      end
      prev_row = row; prev_col = col;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
