// tb_config_regs: writes the global and per-channel registers through the
// byte bus and checks the decoded configuration outputs and read-back,
// the reset values, and the two status counters (counting, clearing,
// saturation).
module tb_config_regs;
  import trace_pkg::*;
  localparam int NC = 8;
  logic clk = 0, rst_n = 0, wr = 0, trig_req = 0;
  logic [15:0] raddr = 0, waddr = 0;
  logic [7:0] rdata, wdata = 0;
  logic [3:0] lost_n = 0;
  logic [7:0] vref1, vref2;
  ch_cfg_t ch_cfg [NC];
  logic [31:0] trig_cnt, lost_cnt;
  int checks = 0, failures = 0;

  config_regs #(.N_CH(NC)) dut (.clk, .rst_n, .raddr, .rdata, .wr, .waddr, .wdata,
    .trig_req, .lost_n, .vref1, .vref2, .ch_cfg, .trig_cnt, .lost_cnt);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); waddr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  function automatic logic [7:0] rreg(input logic [15:0] a);
    raddr = a;
    return rdata;
  endfunction

  task automatic rchk(input logic [15:0] a, input logic [7:0] e);
    raddr = a; #1;
    chk(rdata == e, $sformatf("read %h = %h expected %h", a, rdata, e));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(vref1 == 8'h80 && ch_cfg[3].le_en == 0 && ch_cfg[3].gtrig_mask == 0, "reset values");
    wreg(16'h0000, 8'h33);
    wreg(16'h0001, 8'hC4);
    chk(vref1 == 8'h33 && vref2 == 8'hC4, "vref registers");
    rchk(16'h0000, 8'h33);
    rchk(16'h0001, 8'hC4);
    // channel 5: le_en, polarity, ext_en; global triggers 1 and 3; thresholds
    wreg(16'h0100 + 4 * 5 + 0, 8'b0001_0011);
    wreg(16'h0100 + 4 * 5 + 1, 8'b0000_1010);
    wreg(16'h0100 + 4 * 5 + 2, 8'hD0);
    wreg(16'h0100 + 4 * 5 + 3, 8'h90);
    chk(ch_cfg[5].le_en && ch_cfg[5].polarity && !ch_cfg[5].vref_sel && !ch_cfg[5].test_sel
        && ch_cfg[5].ext_en, "channel 5 control bits");
    chk(ch_cfg[5].gtrig_mask == 4'b1010 && ch_cfg[5].thr_hi == 8'hD0 && ch_cfg[5].thr_lo == 8'h90,
        "channel 5 mask and thresholds");
    chk(!ch_cfg[4].le_en && !ch_cfg[6].le_en && ch_cfg[6].thr_hi == 8'hC0, "neighbours untouched");
    wreg(16'h0100 + 4 * 7 + 0, 8'b0000_1100);
    chk(ch_cfg[7].vref_sel && ch_cfg[7].test_sel && !ch_cfg[7].le_en, "channel 7 vref/test select");
    rchk(16'h0100 + 4 * 5 + 0, 8'b0001_0011);
    rchk(16'h0100 + 4 * 5 + 1, 8'b0000_1010);
    rchk(16'h0100 + 4 * 5 + 2, 8'hD0);
    rchk(16'h0100 + 4 * 5 + 3, 8'h90);
    rchk(16'h0100 + 4 * NC, 8'h00);
    // counters
    @(negedge clk);
    repeat (10) begin trig_req = 1; @(negedge clk); end
    trig_req = 0;
    lost_n = 3; @(negedge clk); lost_n = 2; @(negedge clk); lost_n = 0;
    chk(trig_cnt == 10 && lost_cnt == 5, $sformatf("counters %0d %0d", trig_cnt, lost_cnt));
    rchk(16'h0004, 8'd10); rchk(16'h0005, 8'd0);
    rchk(16'h0008, 8'd5);
    wreg(16'h0004, 8'h00);
    chk(trig_cnt == 0 && lost_cnt == 5, "trigger counter cleared");
    wreg(16'h0008, 8'h00);
    chk(lost_cnt == 0, "lost counter cleared");
    force dut.lost_cnt = 32'hFFFF_FFFE;
    @(negedge clk);
    release dut.lost_cnt;
    lost_n = 4; @(negedge clk); lost_n = 0; @(negedge clk);
    chk(lost_cnt == 32'hFFFF_FFFF, "lost counter saturates");
    rchk(16'h000B, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
