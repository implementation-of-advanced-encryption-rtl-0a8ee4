// aes_keyexp: byte-serial AES-128 key expansion, forward and inverse.
//
// The unit holds one 16-byte round key in a byte-wide shift chain (byte 0 at
// the head). Each cycle with shift_in high the chain moves one place towards
// the head. With step_in low the head byte re-enters at the tail, so sixteen
// shifts simply replay the held round key on key_out. With step_in high the
// byte entering the tail is the corresponding byte of the next round key
// (inverse_in = 0) or of the previous round key (inverse_in = 1), and key_out
// shows that new byte. A run of sixteen stepping shifts therefore replaces
// round key k(r-1) by k(r) (forward) or k(r) by k(r-1) (inverse) while
// streaming the new key out, one byte per cycle, byte 0 first.
//
// seq_in gives the position (0..15) of the byte being produced and round_in
// the round r whose constant Rcon(r) = x^(r-1) is used; in both directions
// round_in is the number of the later key of the pair.
//
// Forward step, byte j of k(r) from k(r-1) = k':
//   j < 4 : k'[j] ^ S(k'[12 + (j+1)%4]) ^ (j == 0 ? Rcon(r) : 0)
//   j >= 4: k'[j] ^ k(r)[j-4]      (the new byte written four shifts ago)
// Inverse step, byte j of k(r-1) = k from k(r) = k':
//   j < 4 : k'[j] ^ S(k'[m] ^ k'[m-4]) ^ (j == 0 ? Rcon(r) : 0), m = 12 + (j+1)%4
//   j >= 4: k'[j] ^ k'[j-4]         (the head byte seen four shifts ago)
// Where these bytes sit in the chain at shift j follows from the rotation: a
// byte k'[m] not yet shifted out is at position m - j. A four-byte delay line
// of past head bytes supplies k'[j-4] in inverse mode.
//
// With load_in high (and shift_in ignored) key_in enters the tail instead: 16
// load cycles bring in a cipher key, byte 0 first.
//
// The document states only that one key expansion serves both encryption and
// decryption and shows these port names in its test waveform; the byte-serial
// scheme, the on-the-fly inverse and the single S-box (the "S2" box) are this
// design's choices.
module aes_keyexp
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_in,
  input  logic       shift_in,
  input  logic       step_in,
  input  logic       inverse_in,
  input  logic [3:0] seq_in,
  input  logic [3:0] round_in,
  input  byte_t      key_in,
  output byte_t      key_out,
  output byte_t      key_d4_out,
  output byte_t      key_o [NBYTES]
);

  byte_t kr  [NBYTES];
  byte_t dly [4];      // dly[0] = head one shift ago, dly[3] = four shifts ago
  byte_t head, s_in, s_out, nb;
  logic  first_word;

  assign head       = kr[0];
  assign first_word = (seq_in < 4'd4);

  always_comb begin
    if (inverse_in)
      s_in = (seq_in == 4'd3) ? (kr[9] ^ kr[5]) : (kr[13] ^ kr[9]);
    else
      s_in = (seq_in == 4'd3) ? kr[9] : kr[13];
  end

  aes_sbox u_s2 (
    .data_in (s_in),
    .data_out(s_out)
  );

  always_comb begin
    if (first_word)
      nb = head ^ s_out ^ ((seq_in == 4'd0) ? rcon(round_in) : 8'h00);
    else
      nb = head ^ (inverse_in ? dly[3] : kr[12]);
  end

  assign key_out    = step_in ? nb : head;
  assign key_d4_out = dly[3];
  assign key_o      = kr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kr  <= '{default: '0};
      dly <= '{default: '0};
    end else if (load_in) begin
      for (int i = 0; i < NBYTES-1; i++) kr[i] <= kr[i+1];
      kr[NBYTES-1] <= key_in;
    end else if (shift_in) begin
      for (int i = 0; i < NBYTES-1; i++) kr[i] <= kr[i+1];
      kr[NBYTES-1] <= key_out;
      dly[0] <= head;
      for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];
    end
  end

endmodule
