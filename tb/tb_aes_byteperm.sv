// tb_aes_byteperm: checks the state register's serial path and the
// ShiftRows / InvShiftRows reload.
// A random block is shifted in, permuted, and shifted out again; every output
// byte is compared with a permutation worked out in the testbench from the
// row/column layout. ShiftRows followed by InvShiftRows must restore the block.
module tb_aes_byteperm;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0, shift = 0, perm = 0, inv = 0;
  logic [7:0] sin = 0, sout;
  logic [7:0] view [16];
  int checks = 0, failures = 0;

  aes_byteperm dut (
    .clk(clk), .rst_n(rst_n), .shift_in(shift), .load_par_in(perm), .inverse_in(inv),
    .data_ser_in(sin), .data_ser_out(sout), .state_o(view)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input blk_t b);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      shift = 1; sin = b[k];
    end
    @(negedge clk);
    shift = 0;
  endtask

  task automatic do_perm(input logic i);
    @(negedge clk);
    perm = 1; inv = i;
    @(negedge clk);
    perm = 0;
  endtask

  // shift out while re-inserting, compare each head byte
  task automatic unload_check(input blk_t exp);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      checks++;
      if (sout !== exp[k]) begin
        failures++;
        $display("FAIL byte %0d = %02h expected %02h", k, sout, exp[k]);
      end
      shift = 1; sin = sout;
    end
    @(negedge clk);
    shift = 0;
  endtask

  initial begin
    blk_t b, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < 16; k++) b[k] = 8'($urandom);
      load(b);
      unload_check(b);
      // ShiftRows: row r of the result is row r rotated left by r
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) e[4*c+r] = b[4*((c+r)%4)+r];
      do_perm(0);
      unload_check(e);
      do_perm(1);
      unload_check(b);
      // InvShiftRows alone: rotate right by r
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) e[4*((c+r)%4)+r] = b[4*c+r];
      do_perm(1);
      unload_check(e);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (view[k] !== e[k]) begin
          failures++;
          $display("FAIL state_o[%0d] = %02h expected %02h", k, view[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
