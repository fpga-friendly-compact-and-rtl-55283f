// sbox_sub_layer: substitution layer of an AES-like cipher built on the compact S-box.
//
// A 128-bit AES-style round substitutes all 16 state bytes (SubBytes). The
// key schedule substitutes one 4-byte word per round (SubWord). That makes
// 20 S-boxes per round, and this layer holds all of them side by side.
// Each state lane holds a forward S-box and an inverse S-box. The
// in_inverse bit picks which one drives the lane, so one layer serves
// encryption and decryption. The key-schedule lanes always use the forward
// S-box, since an AES-style key expansion uses SubWord in both directions.
//
// Lane i of state_in/state_out is state byte s_i, with the state stored
// column by column (s0..s3 = column 0). Lane j of word_in/word_out is byte j
// of the key-schedule word.
//
// Timing: the S-boxes are combinational. One register stage sits at the
// output, so a beat taken with in_valid high appears one clock later with
// out_valid high and out_inverse showing the mode it used. A new beat can
// enter every clock. rst_n is active-low and synchronous, and clears
// out_valid and the output registers.
//
// Follows the source: 16 state S-boxes plus 4 key-schedule S-boxes, which
// are the defaults of N_STATE and N_KEY, and the S-box and its inverse.
// This design's own choices: the single output register, the valid/mode
// signals, the reset and the shared forward/inverse lane.
module sbox_sub_layer #(
  parameter int unsigned N_STATE = 16,
  parameter int unsigned N_KEY   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_inverse,
  input  logic [N_STATE-1:0][7:0] state_in,
  input  logic [N_KEY-1:0][7:0]   word_in,
  output logic                    out_valid,
  output logic                    out_inverse,
  output logic [N_STATE-1:0][7:0] state_out,
  output logic [N_KEY-1:0][7:0]   word_out
);

  logic [N_STATE-1:0][7:0] state_fwd, state_inv, state_sub;
  logic [N_KEY-1:0][7:0]   word_sub;

  for (genvar i = 0; i < N_STATE; i++) begin : g_state
    sbox_fwd u_fwd (.a(state_in[i]), .s(state_fwd[i]));
    sbox_inv u_inv (.s(state_in[i]), .a(state_inv[i]));
    assign state_sub[i] = in_inverse ? state_inv[i] : state_fwd[i];
  end

  for (genvar j = 0; j < N_KEY; j++) begin : g_key
    sbox_fwd u_fwd (.a(word_in[j]), .s(word_sub[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_inverse <= 1'b0;
      state_out   <= '0;
      word_out    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_inverse <= in_inverse;
        state_out   <= state_sub;
        word_out    <= word_sub;
      end
    end
  end

  // A beat accepted in one cycle is presented in the next.
  a_latency_one: assert property (@(posedge clk) disable iff (!rst_n) in_valid |=> out_valid);
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n) !in_valid |=> !out_valid);

endmodule
