// i2c_regs: I2C slave with the register file that holds the PLL's tuning
// parameters. The thesis states only that the PLL's parameters are set
// through registers written over I2C; the protocol subset, the device
// address, the register map and the reset values below are this design's.
//
// Protocol: standard 7-bit addressing. A write is START, address+W, register
// pointer, then any number of data bytes, each written at the pointer, which
// then increments. A read is START, address+R (usually after a write of the
// pointer and a repeated START), then bytes from the pointer, incrementing,
// until the master answers NACK. Every byte of the slave's address and every
// written byte is acknowledged; other addresses are ignored until the next
// START. Writes to read-only or unused addresses are acknowledged and dropped.
//
// Register map (see adpll_pkg): 0x00 CTRL {load_code, opt_alpha_en,
// opt_beta_en}, 0x01/0x02 beta init mantissa / exponent (two's complement),
// 0x03/0x04 alpha init mantissa / exponent, 0x05/0x06 init code low / high;
// 0x08..0x0D read back the live beta, alpha and integral code.
// Reset values: both gains adapting, init gains 17*2^-7 and 17*2^-20, init
// code 512.
//
// Timing: everything runs on `clk` (the PLL uses the inverted reference
// clock, so register updates happen half a reference period away from the
// loop filter's clock edge). SCL and SDA are synchronised with two flip-flops
// and edge-detected, so SCL high and low times must each exceed about four
// `clk` periods (400 kHz I2C against 100 MHz is ample). SDA is open drain:
// sda_oe = 1 pulls the line low.
module i2c_regs
  import adpll_pkg::*;
#(
  parameter logic [6:0] DEV_ADDR = 7'h52
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  output pll_cfg_t    cfg,
  input  pll_status_t status
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_REG, S_WRITE, S_READ} st_t;

  logic [2:0] scl_sy, sda_sy;     // two synchronising stages and one for edges
  logic       scl_rise, scl_fall, start_c, stop_c;
  st_t        state;
  logic [3:0] bitc;               // SCL rises seen in this byte: 1..8 data, 9 acknowledge
  logic [7:0] shreg, txd, ptr;
  logic       rw, nack;
  logic [7:0] rdata, rdata_next;   // register at ptr and at ptr + 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sy <= '1;
      sda_sy <= '1;
    end else begin
      scl_sy <= {scl_sy[1:0], scl};
      sda_sy <= {sda_sy[1:0], sda_in};
    end
  end

  assign scl_rise = scl_sy[1] && !scl_sy[2];
  assign scl_fall = !scl_sy[1] && scl_sy[2];
  assign start_c  = scl_sy[1] && scl_sy[2] && !sda_sy[1] && sda_sy[2];
  assign stop_c   = scl_sy[1] && scl_sy[2] && sda_sy[1] && !sda_sy[2];

  // Read multiplexer.
  function automatic logic [7:0] read_reg(input logic [7:0] a, input pll_cfg_t c,
                                          input pll_status_t st);
    unique case (a)
      REG_CTRL:       return {5'd0, c.load_code, c.opt_alpha_en, c.opt_beta_en};
      REG_BETA_MANT:  return 8'(c.beta_init.mant);
      REG_BETA_EXP:   return 8'(signed'(c.beta_init.exp));
      REG_ALPHA_MANT: return 8'(c.alpha_init.mant);
      REG_ALPHA_EXP:  return 8'(signed'(c.alpha_init.exp));
      REG_CODE_LO:    return c.init_code[7:0];
      REG_CODE_HI:    return 8'(c.init_code[CODE_W-1:8]);
      REG_ST_BMANT:   return 8'(st.beta.mant);
      REG_ST_BEXP:    return 8'(signed'(st.beta.exp));
      REG_ST_AMANT:   return 8'(st.alpha.mant);
      REG_ST_AEXP:    return 8'(signed'(st.alpha.exp));
      REG_ST_CODE_LO: return st.code[7:0];
      REG_ST_CODE_HI: return 8'(st.code[CODE_W-1:8]);
      default:        return 8'h00;
    endcase
  endfunction

  assign rdata      = read_reg(ptr, cfg, status);
  assign rdata_next = read_reg(ptr + 8'd1, cfg, status);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      bitc   <= '0;
      shreg  <= '0;
      txd    <= '0;
      ptr    <= '0;
      rw     <= 1'b0;
      nack   <= 1'b0;
      sda_oe <= 1'b0;
      cfg.opt_beta_en     <= 1'b1;
      cfg.opt_alpha_en    <= 1'b1;
      cfg.load_code       <= 1'b0;
      cfg.beta_init.mant  <= MANT_W'(MANT_MIN);
      cfg.beta_init.exp   <= EXP_W'(BETA_EXP_MIN);
      cfg.alpha_init.mant <= MANT_W'(MANT_MIN);
      cfg.alpha_init.exp  <= EXP_W'(ALPHA_EXP_MIN);
      cfg.init_code       <= CODE_W'(512);
    end else if (start_c) begin
      state  <= S_ADDR;
      bitc   <= '0;
      sda_oe <= 1'b0;
    end else if (stop_c) begin
      state  <= S_IDLE;
      sda_oe <= 1'b0;
    end else if (state != S_IDLE) begin
      if (scl_rise) begin
        if (bitc < 4'd8) shreg <= {shreg[6:0], sda_sy[1]};
        else if (state == S_READ) nack <= sda_sy[1];
        if (bitc < 4'd9) bitc <= bitc + 4'd1;
      end
      if (scl_fall) begin
        if (bitc >= 4'd1 && bitc <= 4'd7) begin
          if (state == S_READ) begin
            txd    <= txd << 1;
            sda_oe <= ~txd[6];
          end
        end else if (bitc == 4'd8) begin
          unique case (state)
            S_ADDR: begin
              if (shreg[7:1] == DEV_ADDR) begin
                rw     <= shreg[0];
                sda_oe <= 1'b1;
              end else begin
                state  <= S_IDLE;
              end
            end
            S_REG: begin
              ptr    <= shreg;
              sda_oe <= 1'b1;
            end
            S_WRITE: begin
              unique case (ptr)
                REG_CTRL: begin
                  cfg.opt_beta_en  <= shreg[0];
                  cfg.opt_alpha_en <= shreg[1];
                  cfg.load_code    <= shreg[2];
                end
                REG_BETA_MANT:  cfg.beta_init.mant  <= shreg[MANT_W-1:0];
                REG_BETA_EXP:   cfg.beta_init.exp   <= shreg[EXP_W-1:0];
                REG_ALPHA_MANT: cfg.alpha_init.mant <= shreg[MANT_W-1:0];
                REG_ALPHA_EXP:  cfg.alpha_init.exp  <= shreg[EXP_W-1:0];
                REG_CODE_LO:    cfg.init_code[7:0]  <= shreg;
                REG_CODE_HI:    cfg.init_code[CODE_W-1:8] <= shreg[CODE_W-9:0];
                default: ;
              endcase
              ptr    <= ptr + 8'd1;
              sda_oe <= 1'b1;
            end
            default: sda_oe <= 1'b0;      // S_READ: release for the master's ACK
          endcase
        end else if (bitc == 4'd9) begin
          // End of the acknowledge bit.
          bitc <= '0;
          unique case (state)
            S_ADDR: begin
              if (rw) begin
                state  <= S_READ;
                txd    <= rdata;
                sda_oe <= ~rdata[7];
              end else begin
                state  <= S_REG;
                sda_oe <= 1'b0;
              end
            end
            S_REG:   begin state <= S_WRITE; sda_oe <= 1'b0; end
            S_WRITE: sda_oe <= 1'b0;
            default: begin                 // S_READ
              if (nack) begin
                state  <= S_IDLE;
                sda_oe <= 1'b0;
              end else begin
                ptr    <= ptr + 8'd1;
                txd    <= rdata_next;
                sda_oe <= ~rdata_next[7];
              end
            end
          endcase
        end
      end
    end
  end

endmodule
