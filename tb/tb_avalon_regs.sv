// Self-checking testbench for avalon_regs: reset values derived from the
// parameters, write/read-back of every setting register, the cfg outputs
// they drive, sign extension of read-only status words, the one-clock read
// latency, the pi_clear pulse, and the interrupt flag (set by loop_done,
// cleared by writing 1).
module tb_avalon_regs;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]  avs_address;
  logic        avs_write, avs_read, avs_readdatavalid, irq, enable, pi_clear, loop_done;
  logic [31:0] avs_writedata, avs_readdata;
  vc_cfg_t     cfg;
  vc_stat_t    stat;
  logic [11:0] adc_ofs_a, adc_ofs_b;
  logic [17:0] pos_mech;
  logic signed [31:0] pos_multi;
  sdata_t      speed, ia, ib;
  logic [15:0] cmpa, cmpb, cmpc;

  avalon_regs dut (.clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .avs_readdatavalid, .irq, .cfg, .enable, .pi_clear, .adc_ofs_a, .adc_ofs_b,
    .stat, .loop_done, .pos_mech, .pos_multi, .speed, .ia, .ib, .cmpa, .cmpb, .cmpc);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_read = 1;
    @(negedge clk); avs_read = 0;
    check(avs_readdatavalid, "readdatavalid one clock after read");
    d = avs_readdata;
  endtask

  initial begin
    logic [31:0] d;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0; loop_done = 0;
    stat = '0; pos_mech = 18'd9999; pos_multi = -32'sd123456; speed = -18'sd77; ia = 18'sd300; ib = -18'sd300;
    cmpa = 16'd11; cmpb = 16'd22; cmpc = 16'd33;
    stat.i_d = -18'sd5; stat.i_q = 18'sd1234; stat.theta_e = 12'd2047; stat.sect_no = 3'd5;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values: PWMPRD 2500, gain 4*4096*16384/10000 = 26844, KX = 2165, KY = 3750, VLIM 9459
    check(cfg.pwmprd == 2500 && cfg.elec_gain == 26844 && cfg.kx == 2165 && cfg.ky == 3750 && cfg.v_lim == 9459,
          $sformatf("reset values %0d %0d %0d %0d %0d", cfg.pwmprd, cfg.elec_gain, cfg.kx, cfg.ky, cfg.v_lim));
    check(!enable && adc_ofs_a == 2048, "reset control");
    // write/readback of the settings
    for (int a = 1; a <= 14; a++) begin
      logic [31:0] v, exp;
      v = 32'($urandom_range(1, 60000));
      if (a == 4 || a == 5) v = -32'(v % 1000);
      wr(a, v);
      rd(a, d);
      unique case (a)
        1: exp = {16'd0, v[15:0]};
        3: exp = {20'd0, v[11:0]};
        13, 14: exp = {20'd0, v[11:0]};
        default: exp = 32'(signed'(v[17:0]));
      endcase
      check(d == exp, $sformatf("reg %0d read %h expected %h", a, d, exp));
    end
    wr(5, -32'sd500);
    check(cfg.iq_ref == -18'sd500, "iq_ref drives cfg");
    // status words
    rd(16, d); check(d == 32'hFFFF_FFFB, "i_d sign-extended");
    rd(17, d); check(d == 1234, "i_q");
    rd(20, d); check(d == {13'd0, 3'd5, 4'd0, 12'd2047}, "angle/sector");
    rd(21, d); check(d == 9999, "pos_mech");
    rd(22, d); check(d == 32'(-123456), "pos_multi");
    rd(23, d); check(d == 32'(-77), "speed");
    rd(27, d); check(d == 22, "cmpb");
    // control, pi_clear pulse, irq
    wr(0, 32'h5);
    check(enable && !pi_clear, "enable set");
    @(negedge clk); avs_address = 0; avs_writedata = 32'h7; avs_write = 1;
    @(negedge clk); avs_write = 0;
    check(pi_clear, "pi_clear pulse");
    @(negedge clk); check(!pi_clear, "pi_clear one clock");
    check(!irq, "no irq before done");
    @(negedge clk); loop_done = 1; stat.oversat = 1;
    @(negedge clk); loop_done = 0;
    check(irq, "irq after loop_done");
    rd(15, d); check(d == 3, "irq flags");
    rd(29, d); check(d == 1, "loop count");
    wr(15, 32'h1);
    check(!irq, "irq cleared");
    rd(15, d); check(d == 2, "oversat flag left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
