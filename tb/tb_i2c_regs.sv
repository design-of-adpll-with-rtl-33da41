// tb_i2c_regs: checks the I2C register block through a bus master model:
// reset values read back over the bus, every writable register written and
// read back (single and auto-incremented multi-byte reads), the cfg outputs
// following the writes, live status registers read back, a foreign device
// address left unacknowledged, and no SDA activity from the slave after it.
module tb_i2c_regs;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [6:0] DEV = 7'h52;

  logic clk = 1'b0, rst_n = 1'b1;
  logic scl, m_oe, s_oe, sda;
  pll_cfg_t cfg;
  pll_status_t status;
  int checks = 0, failures = 0;

  assign sda = ~(m_oe | s_oe);     // open-drain bus with pull-up

  i2c_regs #(.DEV_ADDR(DEV)) dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe(s_oe), .cfg, .status);
  i2c_master #(.T_Q_PS(625000.0)) m (.scl, .sda_oe(m_oe), .sda);

  always #5000 clk = ~clk;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h expected %h", what, got, want); end
  endtask

  initial begin
    logic [31:0] d;
    logic a;
    status.beta.mant = 6'd23; status.beta.exp = -6'sd5;
    status.alpha.mant = 6'd41; status.alpha.exp = -6'sd9;
    status.code = 10'd619;
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #50000;
    // Reset values.
    m.read_regs(DEV, REG_CTRL, 4, d);
    expect_eq(d, 32'h11F9_1103, "reset 0x00..0x03");
    m.read_regs(DEV, REG_ALPHA_EXP, 3, d);
    expect_eq(d[23:0], {8'h02, 8'h00, 8'hEC}, "reset ALPHA_EXP, CODE");
    // Writes.
    m.write_reg(DEV, REG_CTRL, 8'h04);
    m.write_reg(DEV, REG_BETA_MANT, 8'd40);
    m.write_reg(DEV, REG_BETA_EXP, 8'hFE);        // -2
    m.write_reg(DEV, REG_ALPHA_MANT, 8'd30);
    m.write_reg(DEV, REG_ALPHA_EXP, 8'hF3);       // -13
    m.write_reg(DEV, REG_CODE_LO, 8'h6B);
    m.write_reg(DEV, REG_CODE_HI, 8'h02);         // init code 0x26B = 619
    #20000;
    expect_eq({29'd0, cfg.load_code, cfg.opt_alpha_en, cfg.opt_beta_en}, 32'h4, "cfg CTRL");
    expect_eq({26'd0, cfg.beta_init.mant}, 32'd40, "cfg beta mant");
    expect_eq(32'(signed'(cfg.beta_init.exp)), 32'hFFFF_FFFE, "cfg beta exp");
    expect_eq({26'd0, cfg.alpha_init.mant}, 32'd30, "cfg alpha mant");
    expect_eq(32'(signed'(cfg.alpha_init.exp)), 32'hFFFF_FFF3, "cfg alpha exp");
    expect_eq({22'd0, cfg.init_code}, 32'd619, "cfg init code");
    m.read_regs(DEV, REG_CTRL, 4, d);
    expect_eq(d, {8'd30, 8'hFE, 8'd40, 8'h04}, "read back 0x00..0x03");
    m.read_regs(DEV, REG_ALPHA_EXP, 3, d);
    expect_eq(d[23:0], {8'h02, 8'h6B, 8'hF3}, "read back 0x04..0x06");
    // Status registers.
    m.read_regs(DEV, REG_ST_BMANT, 4, d);
    expect_eq(d, {8'hF7, 8'd41, 8'hFB, 8'd23}, "status 0x08..0x0B");
    m.read_regs(DEV, REG_ST_CODE_LO, 2, d);
    expect_eq(d[15:0], {8'h02, 8'h6B}, "status code");
    // Writes to a read-only register are dropped.
    m.write_reg(DEV, REG_ST_BMANT, 8'h3F);
    m.read_regs(DEV, REG_ST_BMANT, 1, d);
    expect_eq(d[7:0], 8'd23, "read-only register");
    // Another device address: no acknowledge.
    m.probe(7'h21, a);
    expect_eq({31'd0, a}, 32'd0, "foreign address acknowledged");
    m.probe(DEV, a);
    expect_eq({31'd0, a}, 32'd1, "own address not acknowledged");
    expect_eq(32'(m.acks_missing), 32'd0, "missing acknowledges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
