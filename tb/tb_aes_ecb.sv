// tb_aes_ecb: encrypts whole messages in ECB mode through the core's pins.
// Two messages are used, 355 KB (22,720 blocks of 16 bytes) and 7.14 MB
// (467,927 blocks), each generated from a fixed seed under its own key; every
// block is loaded with the same key, encrypted, unloaded and
// compared with the reference cipher of aes_ref_pkg. Every 64th block is
// also decrypted again and compared with the plaintext. The testbench checks
// that each encryption is busy for exactly 222 cycles and reports the average
// number of clock cycles per block including load and unload.
module tb_aes_ecb;
  import aes_ref_pkg::*;

  localparam int MSG1_BYTES = 355 * 1024;
  localparam int MSG2_BYTES = 7486832;          // 7.14 * 2^20
  localparam int NBLK_ALL   = (MSG1_BYTES + MSG2_BYTES) / 16;
  localparam int T_OP      = 222;

  logic       clk = 0, rst_n = 0;
  logic [7:0] data_in = 0, key_in = 0, data_out;
  logic       load = 0, start = 0, inv = 0, unload = 0, busy;
  int checks = 0, failures = 0;
  longint cycles = 0;

  aes dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .key_in(key_in),
    .load_in(load), .start_in(start), .inverse_in(inv), .unload_in(unload),
    .data_out(data_out), .busy_out(busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (NBLK_ALL * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_block(input blk_t d, input blk_t k);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      load = 1; data_in = d[i]; key_in = k[i];
    end
    @(negedge clk);
    load = 0;
  endtask

  task automatic unload_block(output blk_t d);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      unload = 1;
      d[i] = data_out;
    end
    @(negedge clk);
    unload = 0;
  endtask

  task automatic run(input logic i, output int n);
    @(negedge clk);
    start = 1; inv = i;
    @(negedge clk);
    start = 0;
    n = 0;
    while (busy) begin
      @(negedge clk);
      n++;
    end
  endtask

  task automatic message(input int nbytes);
    blk_t key, pt, ct, got;
    int n, bad_time, nblk;
    longint c0;
    bit ok;
    nblk = nbytes / 16;
    for (int k = 0; k < 16; k++) key[k] = 8'($urandom);
    bad_time = 0;
    c0 = cycles;
    for (int b = 0; b < nblk; b++) begin
      for (int k = 0; k < 16; k++) pt[k] = 8'($urandom);
      load_block(pt, key);
      run(0, n);
      if (n != T_OP) bad_time++;
      unload_block(got);
      ct = encrypt(pt, key);
      ok = 1;
      for (int k = 0; k < 16; k++) if (got[k] !== ct[k]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d ciphertext", b);
      end
      if (b % 64 == 0) begin
        // key chain is at k10 now: decrypt without reloading
        run(1, n);
        unload_block(got);
        ok = 1;
        for (int k = 0; k < 16; k++) if (got[k] !== pt[k]) ok = 0;
        checks++;
        if (!ok || n != T_OP) begin
          failures++;
          $display("FAIL block %0d round trip (busy %0d cycles)", b, n);
        end
      end
    end
    checks++;
    if (bad_time != 0) begin
      failures++;
      $display("FAIL %0d encryptions not %0d cycles long", bad_time, T_OP);
    end
    $display("ECB %0d bytes: %0d blocks, %0d cycles, %0.1f cycles per block with load/unload and spot decryptions",
             nbytes, nblk, cycles - c0, real'(cycles - c0) / nblk);
  endtask

  initial begin
    void'($urandom(32'h00c0ffee));
    repeat (4) @(posedge clk);
    rst_n = 1;
    message(MSG1_BYTES);
    message(MSG2_BYTES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
