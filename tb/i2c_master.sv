// i2c_master: testbench-only I2C bus master with tasks for register writes and
// reads. It drives SCL push-pull and SDA open drain (sda_oe = 1 pulls low);
// the testbench forms the wired-AND SDA line. T_Q_PS is a quarter of the SCL
// period (625 ns gives 400 kHz).
module i2c_master #(
  parameter real T_Q_PS = 625000.0
) (
  output logic scl,
  output logic sda_oe,
  input  logic sda
);
  timeunit 1ps;
  timeprecision 1fs;

  int acks_missing = 0;

  initial begin
    scl = 1'b1;
    sda_oe = 1'b0;
  end

  task automatic start_cond();
    sda_oe = 1'b0; #(T_Q_PS);
    scl = 1'b1;    #(T_Q_PS);
    sda_oe = 1'b1; #(T_Q_PS);   // SDA falls while SCL is high
    scl = 1'b0;    #(T_Q_PS);
  endtask

  task automatic stop_cond();
    sda_oe = 1'b1; #(T_Q_PS);
    scl = 1'b1;    #(T_Q_PS);
    sda_oe = 1'b0; #(T_Q_PS);   // SDA rises while SCL is high
  endtask

  // One bit: SDA set while SCL is low, sampled in the middle of SCL high.
  task automatic bit_xfer(input logic b, output logic r);
    sda_oe = ~b;   #(T_Q_PS);
    scl = 1'b1;    #(T_Q_PS);
    r = sda;       #(T_Q_PS);
    scl = 1'b0;    #(T_Q_PS);
  endtask

  task automatic byte_out(input logic [7:0] d, output logic ack);
    logic r;
    for (int i = 7; i >= 0; i--) bit_xfer(d[i], r);
    bit_xfer(1'b1, r);
    ack = ~r;
  endtask

  task automatic byte_in(input logic ack, output logic [7:0] d);
    logic r;
    for (int i = 7; i >= 0; i--) begin bit_xfer(1'b1, r); d[i] = r; end
    bit_xfer(~ack, r);
  endtask

  task automatic write_reg(input logic [6:0] dev, input logic [7:0] ptr, input logic [7:0] data);
    logic a;
    start_cond();
    byte_out({dev, 1'b0}, a); if (!a) acks_missing++;
    byte_out(ptr, a);         if (!a) acks_missing++;
    byte_out(data, a);        if (!a) acks_missing++;
    stop_cond();
  endtask

  // Write n (1..4) bytes from data[7:0] upwards at ptr, ptr+1, ... in one
  // transaction.
  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                            input logic [31:0] data);
    logic a;
    start_cond();
    byte_out({dev, 1'b0}, a); if (!a) acks_missing++;
    byte_out(ptr, a);         if (!a) acks_missing++;
    for (int i = 0; i < n; i++) begin
      byte_out(data[8*i +: 8], a); if (!a) acks_missing++;
    end
    stop_cond();
  endtask

  // Read n (1..4) bytes starting at ptr; byte k ends up in d[8*k +: 8].
  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                           output logic [31:0] d);
    logic a;
    logic [7:0] b;
    d = '0;
    start_cond();
    byte_out({dev, 1'b0}, a); if (!a) acks_missing++;
    byte_out(ptr, a);         if (!a) acks_missing++;
    start_cond();             // repeated START
    byte_out({dev, 1'b1}, a); if (!a) acks_missing++;
    for (int k = 0; k < n; k++) begin
      byte_in(k != n - 1, b);
      d[8*k +: 8] = b;
    end
    stop_cond();
  endtask

  // Address a device and report whether it acknowledged.
  task automatic probe(input logic [6:0] dev, output logic ack);
    start_cond();
    byte_out({dev, 1'b0}, ack);
    stop_cond();
  endtask
endmodule
