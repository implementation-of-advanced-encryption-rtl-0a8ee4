// tb_aes: end-to-end test of the AES-128 core through its byte-wide pins.
// Every result is unloaded byte by byte and compared with the behavioural
// reference cipher of aes_ref_pkg; the FIPS-197 appendix C.1 vector is also
// compared with its published ciphertext. The busy time of each operation is
// checked against the schedule (222 cycles, or 382 when the key chain must
// first be run to its other end). The test covers: encryption, decryption,
// decryption straight after a key load (forward key preparation), encryption
// of a result without reloading (inverse key preparation), a start pulse
// while busy (ignored), unload restoring the block, the text block
// "MIT-COE" padded with '-' under the key "ELECTRONICS" padded with '-', and
// random blocks and keys. Each mechanism is counted and must occur.
module tb_aes;
  import aes_ref_pkg::*;

  localparam int T_OP   = 222;
  localparam int T_PREP = 222 + 160;

  logic       clk = 0, rst_n = 0;
  logic [7:0] data_in = 0, key_in = 0, data_out;
  logic       load = 0, start = 0, inv = 0, unload = 0, busy;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_prep_fwd = 0, n_prep_inv = 0, n_ignored = 0, n_unload = 0;
  int n_perm = 0, n_invperm = 0;

  aes dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .key_in(key_in),
    .load_in(load), .start_in(start), .inverse_in(inv), .unload_in(unload),
    .data_out(data_out), .busy_out(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count ShiftRows and InvShiftRows reloads inside the core
  always @(posedge clk)
    if (dut.u_perm.load_par_in) begin
      if (dut.u_perm.inverse_in) n_invperm++;
      else n_perm++;
    end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

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
    n_unload++;
  endtask

  // start an operation, check its busy time, optionally poke start while busy
  task automatic run(input logic i, input int exp_cycles, input bit poke);
    int cyc;
    @(negedge clk);
    start = 1; inv = i;
    @(negedge clk);
    start = 0;
    cyc = 0;
    check(busy === 1'b1, "busy after start");
    while (busy) begin
      if (poke && cyc == 50) begin
        start = 1; inv = !i;
      end else begin
        start = 0;
      end
      @(negedge clk);
      cyc++;
    end
    start = 0;
    if (poke) n_ignored++;
    check(cyc == exp_cycles, $sformatf("busy for %0d cycles, expected %0d", cyc, exp_cycles));
    if (exp_cycles == T_PREP) begin
      if (i) n_prep_fwd++;
      else n_prep_inv++;
    end
    if (i) n_dec++;
    else n_enc++;
  endtask

  task automatic cmp(input blk_t got, input blk_t exp, input string what);
    for (int k = 0; k < 16; k++)
      check(got[k] === exp[k], $sformatf("%s byte %0d = %02h expected %02h", what, k, got[k], exp[k]));
  endtask

  function automatic blk_t from_str(input string s);
    blk_t b;
    for (int k = 0; k < 16; k++) b[k] = (k < s.len()) ? s[k] : "-";
    return b;
  endfunction

  initial begin
    blk_t pt, key, ct, got, fips_ct, again;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // FIPS-197 appendix C.1
    for (int k = 0; k < 16; k++) begin
      pt[k]  = 8'(k * 8'h11);
      key[k] = 8'(k);
    end
    fips_ct = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
                8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    load_block(pt, key);
    run(0, T_OP, 1);
    unload_block(got);
    cmp(got, fips_ct, "FIPS ciphertext");
    cmp(got, encrypt(pt, key), "reference ciphertext");
    unload_block(again);
    cmp(again, got, "second unload");
    run(1, T_OP, 0);                      // key chain already at k10
    unload_block(got);
    cmp(got, pt, "FIPS decryption");

    // decryption directly after a load: forward key preparation
    load_block(fips_ct, key);
    run(1, T_PREP, 0);
    unload_block(got);
    cmp(got, pt, "decrypt after load");

    // encrypt twice without reloading: second run rewinds the key chain
    load_block(pt, key);
    run(0, T_OP, 0);
    run(0, T_PREP, 0);
    unload_block(got);
    cmp(got, encrypt(encrypt(pt, key), key), "double encryption");

    // text block
    pt  = from_str("MIT-COE");
    key = from_str("ELECTRONICS");
    load_block(pt, key);
    run(0, T_OP, 0);
    unload_block(ct);
    cmp(ct, encrypt(pt, key), "MIT-COE ciphertext");
    run(1, T_OP, 0);
    unload_block(got);
    cmp(got, pt, "MIT-COE round trip");

    // random blocks and keys, both directions
    for (int n = 0; n < 12; n++) begin
      for (int k = 0; k < 16; k++) begin
        pt[k] = 8'($urandom); key[k] = 8'($urandom);
      end
      load_block(pt, key);
      if (n[0]) begin
        run(1, T_PREP, 0);
        unload_block(got);
        cmp(got, decrypt(pt, key), "random decryption");
      end else begin
        run(0, T_OP, 0);
        unload_block(got);
        cmp(got, encrypt(pt, key), "random encryption");
      end
    end

    check(n_enc > 0,      "encryption never ran");
    check(n_dec > 0,      "decryption never ran");
    check(n_prep_fwd > 0, "forward key preparation never ran");
    check(n_prep_inv > 0, "inverse key preparation never ran");
    check(n_ignored > 0,  "start while busy never tried");
    check(n_unload > 0,   "unload never ran");
    check(n_perm > 0,     "ShiftRows never ran");
    check(n_invperm > 0,  "InvShiftRows never ran");
    $display("mechanisms: enc=%0d dec=%0d prep_fwd=%0d prep_inv=%0d start_ignored=%0d unload=%0d shiftrows=%0d invshiftrows=%0d",
             n_enc, n_dec, n_prep_fwd, n_prep_inv, n_ignored, n_unload, n_perm, n_invperm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
