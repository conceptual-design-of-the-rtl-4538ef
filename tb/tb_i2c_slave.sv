// tb_i2c_slave: an I2C controller model writes bytes through the target
// into a 64 KiB register model and reads them back with repeated-start
// reads. Checks the acknowledges, the register pointer and its
// auto-increment, every write pulse, every read byte, and that a
// transfer to another target address is ignored.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl, sda_low, sda_oe, sda;
  logic [15:0] reg_raddr, reg_waddr;
  logic [7:0]  reg_rdata, reg_wdata;
  logic reg_wr;
  logic [7:0] regs [65536];
  int checks = 0, failures = 0, writes = 0;

  assign sda = !(sda_low || sda_oe);
  assign reg_rdata = regs[reg_raddr];

  i2c_slave #(.ADDR(7'h2A)) dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe,
    .reg_raddr, .reg_rdata, .reg_wr, .reg_waddr, .reg_wdata);
  i2c_master_bfm #(.Q(8), .ADDR(7'h2A)) m (.clk, .sda, .scl, .sda_low);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && reg_wr) begin
    regs[reg_waddr] <= reg_wdata;
    writes++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] wd [] = new[5];
    logic [7:0] rd [];
    for (int i = 0; i < 65536; i++) regs[i] = 8'(i * 7);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    wd = '{8'h5A, 8'hC3, 8'h01, 8'hFF, 8'h80};
    m.reg_write(16'h0123, wd, 5);
    chk(m.ack_errors == 0, "write acknowledged");
    chk(writes == 5, $sformatf("%0d write pulses", writes));
    for (int i = 0; i < 5; i++)
      chk(regs[16'h0123 + i] == wd[i], $sformatf("register %h", 16'h0123 + i));
    m.reg_read(16'h0122, rd, 7);
    chk(m.ack_errors == 0, "read acknowledged");
    chk(rd[0] == 8'(16'h0122 * 7), "read byte before the block");
    for (int i = 0; i < 5; i++)
      chk(rd[i + 1] == wd[i], $sformatf("read back %0d: %h", i, rd[i + 1]));
    chk(rd[6] == 8'(16'h0128 * 7), "read byte after the block");
    // a different target address: no acknowledge, no write
    m.start_cond();
    m.send_byte({7'h11, 1'b0});
    m.send_byte(8'h00);
    m.stop_cond();
    chk(m.ack_errors == 2 && writes == 5, "other target address ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
