// tb_sbox_sub_layer: end-to-end test of the substitution layer at its
// default size (16 state lanes, 4 key-schedule lanes).
//
// Random beats, random bubbles and random forward/inverse modes are driven
// for a few thousand cycles. Every output beat is compared with the
// published forward and inverse S-box tables. The one-cycle latency and the
// valid/mode outputs are checked on every cycle, and the outputs must hold
// their value through bubbles. The test counts how often each mechanism
// occurred: forward beats, inverse beats, mode switches between consecutive
// beats, bubbles, back-to-back beats and the zero byte (whose field inverse
// is defined as zero). A mechanism that never occurred counts as a failure.
module tb_sbox_sub_layer;
  localparam int unsigned NS = 16;
  localparam int unsigned NK = 4;
  localparam int          BEATS = 4000;

  logic [7:0] fwd_tab [256];
  logic [7:0] inv_tab [256];

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, in_inverse = 1'b0;
  logic [NS-1:0][7:0] state_in = '0;
  logic [NK-1:0][7:0] word_in = '0;
  logic              out_valid, out_inverse;
  logic [NS-1:0][7:0] state_out;
  logic [NK-1:0][7:0] word_out;

  // Expected outputs, built from the inputs of the previous cycle.
  logic              exp_valid = 1'b0, exp_inverse = 1'b0;
  logic [NS-1:0][7:0] exp_state = '0;
  logic [NK-1:0][7:0] exp_word = '0;

  int checks = 0, failures = 0, cycles = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_bubble = 0, n_b2b = 0, n_zero = 0;
  logic last_mode = 1'b0, have_last = 1'b0, last_valid = 1'b0;

  sbox_sub_layer dut (
    .clk, .rst_n, .in_valid, .in_inverse, .state_in, .word_in,
    .out_valid, .out_inverse, .state_out, .word_out
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/sbox_fwd_table.hex", fwd_tab);
    $readmemh("tb/sbox_inv_table.hex", inv_tab);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 check(out_valid == 1'b0 && state_out == '0 && word_out == '0, "reset state");

    for (int beat = 0; beat < BEATS; beat++) begin
      // Drive the next cycle's inputs.
      in_valid   = ($urandom_range(0, 3) != 0);
      in_inverse = $urandom_range(0, 1) == 1;
      for (int i = 0; i < NS; i++) state_in[i] = 8'($urandom);
      for (int j = 0; j < NK; j++) word_in[j] = 8'($urandom);
      if (beat % 97 == 5) begin
        state_in = '0;
        word_in  = '0;
      end

      // Record what this beat exercises.
      if (in_valid) begin
        if (in_inverse) n_inv++; else n_fwd++;
        if (have_last && last_mode != in_inverse) n_switch++;
        if (last_valid) n_b2b++;
        for (int i = 0; i < NS; i++) if (state_in[i] == 8'h00) n_zero++;
        last_mode = in_inverse;
        have_last = 1'b1;
      end else begin
        n_bubble++;
      end
      last_valid = in_valid;

      // Reference for the cycle after the clock edge.
      exp_valid = in_valid;
      if (in_valid) begin
        exp_inverse = in_inverse;
        for (int i = 0; i < NS; i++)
          exp_state[i] = in_inverse ? inv_tab[state_in[i]] : fwd_tab[state_in[i]];
        for (int j = 0; j < NK; j++) exp_word[j] = fwd_tab[word_in[j]];
      end

      @(posedge clk);
      cycles++;
      #1;
      check(out_valid == exp_valid, "out_valid latency");
      check(out_inverse == exp_inverse, "out_inverse");
      check(state_out == exp_state, "state lanes");
      check(word_out == exp_word, "key-schedule lanes");
    end

    in_valid = 1'b0;
    @(posedge clk);
    #1 check(out_valid == 1'b0, "drain");

    $display("mechanisms: forward=%0d inverse=%0d mode_switch=%0d bubble=%0d back_to_back=%0d zero_byte=%0d",
             n_fwd, n_inv, n_switch, n_bubble, n_b2b, n_zero);
    check(n_fwd > 0, "forward beat occurred");
    check(n_inv > 0, "inverse beat occurred");
    check(n_switch > 0, "mode switch occurred");
    check(n_bubble > 0, "bubble occurred");
    check(n_b2b > 0, "back-to-back beat occurred");
    check(n_zero > 0, "zero byte occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
