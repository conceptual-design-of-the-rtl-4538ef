// i2c_master_bfm: bus-functional I2C controller for the testbenches.
//
// Drives SCL (push-pull, no clock stretching) and pulls SDA low through
// sda_low; sda is the wired-AND line value. Timing counts cycles of clk:
// one SCL period is 4 * Q cycles. Tasks: reg_write (pointer + bytes),
// reg_read (set pointer, then repeated-start read of n bytes). ack_errors
// counts missing target acknowledges.
module i2c_master_bfm #(
  parameter int         Q    = 10,
  parameter logic [6:0] ADDR = 7'h2A
) (
  input  logic clk,
  input  logic sda,
  output logic scl,
  output logic sda_low
);
  int ack_errors = 0;

  initial begin
    scl = 1'b1;
    sda_low = 1'b0;
  end

  task automatic q_wait(input int n = 1);
    repeat (n * Q) @(posedge clk);
  endtask

  task automatic start_cond();
    sda_low = 1'b0; scl = 1'b1; q_wait();
    sda_low = 1'b1; q_wait();
    scl = 1'b0; q_wait();
  endtask

  task automatic stop_cond();
    sda_low = 1'b1; q_wait();
    scl = 1'b1; q_wait();
    sda_low = 1'b0; q_wait(2);
  endtask

  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      sda_low = !b[i]; q_wait();
      scl = 1'b1; q_wait(2);
      scl = 1'b0; q_wait();
    end
    sda_low = 1'b0; q_wait();
    scl = 1'b1; q_wait();
    if (sda) ack_errors++;
    q_wait();
    scl = 1'b0; q_wait();
  endtask

  task automatic recv_byte(output logic [7:0] b, input bit ack);
    sda_low = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      q_wait();
      scl = 1'b1; q_wait();
      b[i] = sda;
      q_wait();
      scl = 1'b0;
    end
    q_wait();
    sda_low = ack; q_wait();
    scl = 1'b1; q_wait(2);
    scl = 1'b0; q_wait();
    sda_low = 1'b0;
  endtask

  task automatic reg_write(input logic [15:0] addr, input logic [7:0] data [], input int n);
    start_cond();
    send_byte({ADDR, 1'b0});
    send_byte(addr[15:8]);
    send_byte(addr[7:0]);
    for (int i = 0; i < n; i++) send_byte(data[i]);
    stop_cond();
  endtask

  task automatic reg_write1(input logic [15:0] addr, input logic [7:0] data);
    logic [7:0] d [] = new[1];
    d[0] = data;
    reg_write(addr, d, 1);
  endtask

  task automatic reg_read(input logic [15:0] addr, output logic [7:0] data [], input int n);
    data = new[n];
    start_cond();
    send_byte({ADDR, 1'b0});
    send_byte(addr[15:8]);
    send_byte(addr[7:0]);
    // repeated start
    sda_low = 1'b0; q_wait();
    scl = 1'b1; q_wait();
    sda_low = 1'b1; q_wait();
    scl = 1'b0; q_wait();
    send_byte({ADDR, 1'b1});
    for (int i = 0; i < n; i++) recv_byte(data[i], i != n - 1);
    stop_cond();
  endtask
endmodule
