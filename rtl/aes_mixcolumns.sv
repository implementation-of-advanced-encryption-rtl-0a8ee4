// aes_mixcolumns: byte-serial MixColumns / InvMixColumns unit.
//
// Bytes of a state column arrive one per cycle on data_in, row 0 first, while
// start_in is high. Three bytes are held in a small shift register; when the
// fourth byte arrives, the whole column (three held bytes plus the incoming
// one) is transformed and the four result bytes are registered on
// data0_out..data3_out (row 0..3). inverse_in selects InvMixColumns.
//
// Timing: if the fourth byte of a column is accepted at cycle t, its result is
// on the outputs from cycle t+1 until the next column completes, i.e. for four
// cycles in a continuous stream. This is what lets the core serialise one
// column's result while the next column is being collected. out_valid_o pulses
// for one cycle when a new result is registered.
//
// The byte-serial input and the four parallel outputs follow the unit's test
// waveform in the source document; the counter-based column framing and the
// registered outputs are choices of this design. The byte counter starts at 0
// after reset and wraps every four accepted bytes.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_in,
  input  logic  inverse_in,
  input  byte_t data_in,
  output byte_t data0_out,
  output byte_t data1_out,
  output byte_t data2_out,
  output byte_t data3_out,
  output logic  out_valid_o
);

  byte_t      held [3];
  logic [1:0] cnt;
  col_t       col, res;

  assign col = '{held[0], held[1], held[2], data_in};
  assign res = inverse_in ? inv_mix_col(col) : mix_col(col);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt         <= '0;
      held        <= '{default: '0};
      data0_out   <= '0;
      data1_out   <= '0;
      data2_out   <= '0;
      data3_out   <= '0;
      out_valid_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      if (start_in) begin
        cnt <= cnt + 2'd1;
        if (cnt != 2'd3) held[cnt] <= data_in;
        if (cnt == 2'd3) begin
          data0_out   <= res[0];
          data1_out   <= res[1];
          data2_out   <= res[2];
          data3_out   <= res[3];
          out_valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
