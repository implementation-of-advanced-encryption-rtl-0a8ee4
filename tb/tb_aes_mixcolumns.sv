// tb_aes_mixcolumns: checks the byte-serial MixColumns unit.
// Columns are streamed back to back, one byte per cycle; one cycle after the
// fourth byte the four outputs must hold the (Inv)MixColumns result worked out
// with the reference multiplier, and out_valid_o must pulse. The columns
// include the known pair db 13 53 45 -> 8e 4d a1 bc in both directions, and
// random columns in both modes; a gap in start_in must hold the byte count.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0, inv = 0;
  logic [7:0] din = 0;
  logic [7:0] d0, d1, d2, d3;
  logic       vld;
  int checks = 0, failures = 0;

  aes_mixcolumns dut (
    .clk(clk), .rst_n(rst_n), .start_in(start), .inverse_in(inv), .data_in(din),
    .data0_out(d0), .data1_out(d1), .data2_out(d2), .data3_out(d3), .out_valid_o(vld)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_col(input logic [7:0] a [4], input logic i);
    logic [7:0] r [4];
    for (int w = 0; w < 4; w++)
      r[w] = i ? (mul(a[w], 14) ^ mul(a[(w+1)%4], 11) ^ mul(a[(w+2)%4], 13) ^ mul(a[(w+3)%4], 9))
               : (mul(a[w], 2) ^ mul(a[(w+1)%4], 3) ^ a[(w+2)%4] ^ a[(w+3)%4]);
    return {r[0], r[1], r[2], r[3]};
  endfunction

  task automatic run_col(input logic [7:0] a [4], input logic i, input logic [31:0] exp, input bit gap);
    for (int w = 0; w < 4; w++) begin
      if (gap && w == 2) begin
        @(negedge clk);
        start = 0;
      end
      @(negedge clk);
      start = 1; inv = i; din = a[w];
    end
    @(posedge clk);
    #1;
    start = 0;
    checks++;
    if (!vld || {d0, d1, d2, d3} !== exp) begin
      failures++;
      $display("FAIL inv=%0d col=%02h%02h%02h%02h got %02h%02h%02h%02h valid=%0d expected %08h",
               i, a[0], a[1], a[2], a[3], d0, d1, d2, d3, vld, exp);
    end
  endtask

  initial begin
    logic [7:0] a [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    a = '{8'hdb, 8'h13, 8'h53, 8'h45};
    run_col(a, 1'b0, 32'h8e4da1bc, 0);
    a = '{8'h8e, 8'h4d, 8'ha1, 8'hbc};
    run_col(a, 1'b1, 32'hdb135345, 0);
    for (int n = 0; n < 400; n++) begin
      logic i;
      i = n[0];
      for (int w = 0; w < 4; w++) a[w] = 8'($urandom);
      run_col(a, i, ref_col(a, i), (n % 7) == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
