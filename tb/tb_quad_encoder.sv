// Self-checking testbench for quad_encoder (reduced to a 5-line encoder,
// i.e. 20 counts per turn, and a 400-clock speed window). A quadrature
// model moves the shaft forward and backward; position within the turn,
// multi-turn position, wrap-around in both directions and the speed count
// per window are compared with the model's own step count. Glitches shorter
// than the filter length must not count; a double transition raises err.
module tb_quad_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int LINES = 5, CNT = 4 * LINES, WIN = 400;
  logic               enc_a, enc_b, speed_valid, err;
  logic [17:0]        pos_mech;
  logic signed [31:0] pos_multi;
  logic signed [17:0] speed;

  quad_encoder #(.ENC_LINES(LINES), .FILT_LEN(4), .SPEED_WIN(WIN)) dut (
    .clk, .rst_n, .enc_a, .enc_b, .pos_mech, .pos_multi, .speed, .speed_valid, .err);

  int checks = 0, failures = 0;
  int model = 0;     // steps taken by the model
  int phase = 0;     // 0..3 position in the A/B sequence
  int n_err = 0;
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int dir, input int hold);
    phase = (phase + dir + 4) % 4;
    model += dir;
    {enc_a, enc_b} = seq[phase];
    repeat (hold) @(negedge clk);
  endtask

  always @(negedge clk) if (err) n_err++;

  function automatic int wrap(input int v);
    return ((v % CNT) + CNT) % CNT;
  endfunction

  initial begin
    int spd_seen;
    enc_a = 0; enc_b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 47; k++) step(1, 10);
    repeat (10) @(negedge clk);
    check(pos_multi == model && int'(pos_mech) == wrap(model), $sformatf("forward %0d/%0d mech %0d", pos_multi, model, pos_mech));
    for (int k = 0; k < 70; k++) step(-1, 10);
    repeat (10) @(negedge clk);
    check(pos_multi == model && int'(pos_mech) == wrap(model), $sformatf("backward %0d/%0d mech %0d", pos_multi, model, pos_mech));
    // glitch of 2 clocks on A: must not count, not even for a moment
    begin
      bit moved = 0;
      enc_a = ~enc_a;
      for (int k = 0; k < 14; k++) begin
        if (k == 2) enc_a = ~enc_a;
        @(negedge clk);
        if (pos_multi != model) moved = 1;
      end
      check(!moved && pos_multi == model, "glitch rejected");
    end
    // constant speed: one step every 20 clocks -> 20 steps per 400-clock window
    spd_seen = 0;
    fork
      begin for (int k = 0; k < 60 * 20 / 20; k++) step(1, 20); end
      begin
        repeat (2) @(posedge speed_valid);
        @(posedge speed_valid); @(negedge clk);
        check(speed == 18'sd20, $sformatf("speed %0d expected 20", speed));
        spd_seen = 1;
      end
    join
    check(spd_seen == 1, "speed window seen");
    // double transition (both channels at once)
    check(n_err == 0, "no error before");
    {enc_a, enc_b} = ~{enc_a, enc_b};
    repeat (12) @(negedge clk);
    check(n_err == 1, $sformatf("err count %0d", n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
