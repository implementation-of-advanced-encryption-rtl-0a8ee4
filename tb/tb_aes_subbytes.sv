// tb_aes_subbytes: exhaustive check of SubBytes and InvSubBytes.
// Both directions are compared for all 256 inputs with the reference tables
// of aes_ref_pkg, and the round trip InvS(S(x)) = x is checked.
module tb_aes_subbytes;
  import aes_ref_pkg::*;

  logic       inv;
  logic [7:0] din, dout;
  logic [7:0] s [256], si [256];
  int checks = 0, failures = 0;
  logic clk = 0;

  aes_subbytes dut (.inverse_in(inv), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic i, input logic [7:0] a, input logic [7:0] exp);
    inv = i;
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL inverse=%0d in=%02h out=%02h expected %02h", i, a, dout, exp);
    end
  endtask

  initial begin
    logic [7:0] fwd;
    build_sbox(s, si);
    for (int a = 0; a < 256; a++) chk(1'b0, 8'(a), s[a]);
    for (int a = 0; a < 256; a++) chk(1'b1, 8'(a), si[a]);
    for (int a = 0; a < 256; a++) begin
      inv = 1'b0; din = 8'(a); #1 fwd = dout;
      chk(1'b1, fwd, 8'(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
