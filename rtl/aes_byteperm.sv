// aes_byteperm: the 16-byte state register of the core, with serial access
// and the ShiftRows byte permutation.
//
// The register is a byte-wide shift chain: byte 0 is the head, read on
// data_ser_out, and with shift_in high every byte moves one place towards the
// head while data_ser_in enters at byte 15. Sixteen shifts therefore pass the
// whole block through whatever logic sits between data_ser_out and
// data_ser_in, and leave it in its original byte order.
//
// With load_par_in high the register is reloaded in one cycle with its own
// bytes permuted: ShiftRows when inverse_in is 0 (row r rotated left by r
// bytes), InvShiftRows when inverse_in is 1 (row r rotated right by r bytes).
// Byte i sits in row i mod 4, column i div 4. load_par_in wins over shift_in.
// state_o shows all 16 bytes (index = byte number).
//
// The row shifts (0, 1, 2, 3 bytes for rows 0..3) are the document's; the
// serial shift chain and the one-cycle parallel permutation are this design's
// choice.
module aes_byteperm
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_in,
  input  logic  load_par_in,
  input  logic  inverse_in,
  input  byte_t data_ser_in,
  output byte_t data_ser_out,
  output byte_t state_o [NBYTES]
);

  byte_t st [NBYTES];
  byte_t perm [NBYTES];

  // Byte of column c, row r comes from column c+r (ShiftRows) or c-r
  // (InvShiftRows) of the same row.
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign perm[4*c+r] = inverse_in ? st[4*((c+4-r)%4)+r] : st[4*((c+r)%4)+r];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= '{default: '0};
    end else if (load_par_in) begin
      st <= perm;
    end else if (shift_in) begin
      for (int i = 0; i < NBYTES-1; i++) st[i] <= st[i+1];
      st[NBYTES-1] <= data_ser_in;
    end
  end

  assign data_ser_out = st[0];
  assign state_o      = st;

endmodule
