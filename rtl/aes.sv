// aes: byte-serial AES-128 encryption and decryption core.
//
// Everything moves one byte per cycle. The 128-bit block lives in a 16-byte
// shift chain (aes_byteperm) and the round key in a second one (aes_keyexp).
// A round streams the block once through the sub-byte unit (one S-box), the
// byte-serial MixColumns unit and the AddRoundKey XOR, while the key chain
// computes the matching round key byte by byte. ShiftRows needs no datapath
// of its own: it is a one-cycle parallel reload of the state chain, done
// before the byte stream of each round (SubBytes and ShiftRows commute).
//
// Ports (31 pins including clk and rst_n):
//   data_in, key_in  byte inputs, shifted in together while load_in is high;
//                    16 load cycles bring in one block and one cipher key,
//                    byte 0 first.
//   start_in         starts an operation while idle; inverse_in, sampled in
//                    the same cycle, selects decryption (1) or encryption (0).
//                    start_in has priority over load_in and unload_in.
//   unload_in        while idle, rotates the state one byte per cycle; the
//                    byte on data_out is taken in each unload cycle, so 16
//                    unload cycles read bytes 0..15 and leave the block as it
//                    was.
//   data_out         always the head byte (byte 0) of the state chain.
//   busy_out         high from the cycle after start_in until the result is
//                    in the state chain; load, start and unload are ignored
//                    meanwhile.
//   rst_n            synchronous, active low; clears state, key and control.
//
// Sequence of one block (cycles counted while busy_out is high):
//   encryption:  ARK 16, then 9 x (PERM 1 + ROUND 20), then PERM 1 + FINAL 16
//                = 222 cycles;
//   decryption:  the same 222 cycles with the inverse transforms.
// ARK XORs the round key into the block. ROUND passes 16 bytes into the
// MixColumns unit and, four cycles behind, writes its results back, hence 20
// cycles. In encryption the key is added after MixColumns, in decryption
// before InvMixColumns (the straightforward inverse cipher), so one MixColumns
// unit serves both.
//
// The key chain holds the cipher key k0 after loading and k10 after an
// encryption; decryption walks it back to k0. An operation that needs the
// other end first runs 10 key-only passes of 16 cycles (160 extra cycles):
// forward before the first decryption after a key load, inverse before an
// encryption that follows an encryption. The same key expansion therefore
// serves both directions and no round keys are stored.
//
// The port list and its names, the byte-wide data path and the use of one key
// expansion for both directions follow the source document. The schedule,
// the protocol of load/start/unload, the priority between them and the reset
// behaviour are this design's own.
module aes
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t data_in,
  input  byte_t key_in,
  input  logic  load_in,
  input  logic  start_in,
  input  logic  inverse_in,
  input  logic  unload_in,
  output byte_t data_out,
  output logic  busy_out
);

  typedef enum logic [2:0] {
    S_IDLE,   // waiting; load / unload / start
    S_KPREP,  // key-only pass to bring the key chain to k0 or k10
    S_ARK,    // initial AddRoundKey
    S_PERM,   // ShiftRows / InvShiftRows reload
    S_ROUND,  // SubBytes + MixColumns + AddRoundKey stream (20 cycles)
    S_FINAL   // last round without MixColumns (16 cycles)
  } state_e;

  state_e     state;
  logic       inv;       // operation is a decryption
  logic       key_last;  // key chain holds k10 (else k0)
  logic [4:0] cyc;       // cycle within a pass
  logic [3:0] rnd;       // round number given to the key expansion

  // ---------------------------------------------------------------- datapath
  byte_t head, sub_out, key_out, st_in, mc_byte;
  byte_t mc_out [4];
  logic  st_shift, st_perm, mc_en;
  logic  k_shift, k_step, k_inv;
  logic [3:0] k_seq;
  logic  mc_valid;

  aes_byteperm u_perm (
    .clk         (clk),
    .rst_n       (rst_n),
    .shift_in    (st_shift),
    .load_par_in (st_perm),
    .inverse_in  (inv),
    .data_ser_in (st_in),
    .data_ser_out(head),
    .state_o     ()
  );

  aes_subbytes u_sub (
    .inverse_in(inv),
    .data_in   (head),
    .data_out  (sub_out)
  );

  aes_mixcolumns u_mix (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_in   (mc_en),
    .inverse_in (inv),
    .data_in    (inv ? (sub_out ^ key_out) : sub_out),
    .data0_out  (mc_out[0]),
    .data1_out  (mc_out[1]),
    .data2_out  (mc_out[2]),
    .data3_out  (mc_out[3]),
    .out_valid_o(mc_valid)
  );

  aes_keyexp u_key (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_in   (state == S_IDLE && load_in && !start_in),
    .shift_in  (k_shift),
    .step_in   (k_step),
    .inverse_in(k_inv),
    .seq_in    (k_seq),
    .round_in  (rnd),
    .key_in    (key_in),
    .key_out   (key_out),
    .key_d4_out(),
    .key_o     ()
  );

  assign mc_byte  = mc_out[cyc[1:0]];
  assign data_out = head;
  assign busy_out = (state != S_IDLE);

  always_comb begin
    st_shift = 1'b0;
    st_perm  = 1'b0;
    st_in    = head;
    mc_en    = 1'b0;
    k_shift  = 1'b0;
    k_step   = 1'b0;
    k_inv    = inv;
    k_seq    = cyc[3:0];
    unique case (state)
      S_IDLE: begin
        if (!start_in && load_in) begin
          st_shift = 1'b1;
          st_in    = data_in;
        end else if (!start_in && unload_in) begin
          st_shift = 1'b1;
          st_in    = head;
        end
      end
      S_KPREP: begin
        k_shift = 1'b1;
        k_step  = 1'b1;
        k_inv   = !inv;   // decryption needs k10 first, encryption k0
      end
      S_ARK: begin
        st_shift = 1'b1;
        st_in    = head ^ key_out;
        k_shift  = 1'b1;
      end
      S_PERM: st_perm = 1'b1;
      S_ROUND: begin
        st_shift = 1'b1;
        mc_en    = (cyc < 5'd16);
        if (cyc >= 5'd4) st_in = inv ? mc_byte : (mc_byte ^ key_out);
        if (inv) begin
          k_shift = (cyc < 5'd16);
          k_step  = (cyc < 5'd16);
        end else begin
          k_shift = (cyc >= 5'd4);
          k_step  = (cyc >= 5'd4);
          k_seq   = 4'(cyc - 5'd4);
        end
      end
      S_FINAL: begin
        st_shift = 1'b1;
        st_in    = sub_out ^ key_out;
        k_shift  = 1'b1;
        k_step   = 1'b1;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inv      <= 1'b0;
      key_last <= 1'b0;
      cyc      <= '0;
      rnd      <= 4'd1;
    end else begin
      unique case (state)
        S_IDLE: begin
          cyc <= '0;
          if (start_in) begin
            inv <= inverse_in;
            if (inverse_in != key_last) begin
              state <= S_KPREP;
              rnd   <= inverse_in ? 4'd1 : 4'(NROUNDS);
            end else begin
              state <= S_ARK;
              rnd   <= inverse_in ? 4'(NROUNDS) : 4'd1;
            end
          end else if (load_in) begin
            key_last <= 1'b0;
          end
        end
        S_KPREP: begin
          cyc <= cyc + 5'd1;
          if (cyc == 5'd15) begin
            cyc <= '0;
            if (rnd == (inv ? 4'(NROUNDS) : 4'd1)) begin
              state    <= S_ARK;
              key_last <= inv;
              // the first keyed round: k1 for encryption, k9 (step 10) for decryption
              rnd      <= inv ? 4'(NROUNDS) : 4'd1;
            end else begin
              rnd <= inv ? rnd + 4'd1 : rnd - 4'd1;
            end
          end
        end
        S_ARK: begin
          cyc <= cyc + 5'd1;
          if (cyc == 5'd15) begin
            cyc   <= '0;
            state <= S_PERM;
          end
        end
        S_PERM: begin
          cyc   <= '0;
          state <= (rnd == (inv ? 4'd1 : 4'(NROUNDS))) ? S_FINAL : S_ROUND;
        end
        S_ROUND: begin
          cyc <= cyc + 5'd1;
          if (cyc == 5'd19) begin
            cyc   <= '0;
            state <= S_PERM;
            rnd   <= inv ? rnd - 4'd1 : rnd + 4'd1;
          end
        end
        S_FINAL: begin
          cyc <= cyc + 5'd1;
          if (cyc == 5'd15) begin
            cyc      <= '0;
            state    <= S_IDLE;
            key_last <= !inv;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- checks
  // A MixColumns result must be ready exactly when the write-back of each
  // column starts, and a pass never overruns its length.
  a_mix_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ROUND && cyc >= 5'd4 && cyc[1:0] == 2'd0) |-> mc_valid);
  a_pass_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ROUND) ? (cyc <= 5'd19) : (cyc <= 5'd15));
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n)
    rnd >= 4'd1 && rnd <= 4'(NROUNDS));

endmodule
