// tb_aes_sbox: exhaustive check of the forward S-box.
// All 256 inputs are compared with an exp/log-table S-box from aes_ref_pkg,
// and a few input/output pairs are compared with fixed values
// (00->63, 20->b7, 22->93, 48->52, 58->6a, 86->44, 87->17).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] din, dout;
  logic [7:0] s [256], si [256];
  int checks = 0, failures = 0;
  logic clk = 0;

  aes_sbox dut (.data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] a, input logic [7:0] exp);
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL S(%02h) = %02h, expected %02h", a, dout, exp);
    end
  endtask

  initial begin
    build_sbox(s, si);
    for (int a = 0; a < 256; a++) chk(8'(a), s[a]);
    chk(8'h00, 8'h63); chk(8'h20, 8'hb7); chk(8'h22, 8'h93); chk(8'h48, 8'h52);
    chk(8'h58, 8'h6a); chk(8'h86, 8'h44); chk(8'h87, 8'h17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
