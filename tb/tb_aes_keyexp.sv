// tb_aes_keyexp: checks the byte-serial key expansion in both directions.
// A cipher key is loaded, replayed once without stepping, stepped forward ten
// times (every key_out byte compared with the reference key schedule of
// aes_ref_pkg) and stepped back ten times to the cipher key. The FIPS-197
// example key must reach the published round-10 key
// d014f9a8c9ee2589e13f0cc8b6630ca6; random keys follow.
module tb_aes_keyexp;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0, load = 0, shift = 0, step = 0, inv = 0;
  logic [3:0] seq = 0, rnd = 1;
  logic [7:0] kin = 0, kout, kd4;
  logic [7:0] view [16];
  int checks = 0, failures = 0;

  aes_keyexp dut (
    .clk(clk), .rst_n(rst_n), .load_in(load), .shift_in(shift), .step_in(step),
    .inverse_in(inv), .seq_in(seq), .round_in(rnd), .key_in(kin),
    .key_out(kout), .key_d4_out(kd4), .key_o(view)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input logic st, input logic i, input logic [3:0] r, input blk_t exp);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      shift = 1; step = st; inv = i; seq = 4'(k); rnd = r;
      #1;
      checks++;
      if (kout !== exp[k]) begin
        failures++;
        $display("FAIL step=%0d inv=%0d round=%0d byte %0d = %02h expected %02h", st, i, r, k, kout, exp[k]);
      end
    end
    @(negedge clk);
    shift = 0; step = 0;
  endtask

  task automatic run_key(input blk_t key);
    logic [7:0] s [256], si [256];
    logic [7:0] rk [11][16];
    blk_t e;
    build_sbox(s, si);
    expand(key, s, rk);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      load = 1; kin = key[k];
    end
    @(negedge clk);
    load = 0;
    pass(0, 0, 4'd1, key);
    for (int r = 1; r <= 10; r++) begin
      for (int k = 0; k < 16; k++) e[k] = rk[r][k];
      pass(1, 0, 4'(r), e);
    end
    pass(0, 0, 4'd1, e);
    for (int r = 10; r >= 1; r--) begin
      for (int k = 0; k < 16; k++) e[k] = rk[r-1][k];
      pass(1, 1, 4'(r), e);
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (view[k] !== key[k]) begin
        failures++;
        $display("FAIL key byte %0d not restored", k);
      end
    end
  endtask

  initial begin
    blk_t key, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    key = '{8'h2b, 8'h7e, 8'h15, 8'h16, 8'h28, 8'hae, 8'hd2, 8'ha6,
            8'hab, 8'hf7, 8'h15, 8'h88, 8'h09, 8'hcf, 8'h4f, 8'h3c};
    // published round-10 key of this example
    e = '{8'hd0, 8'h14, 8'hf9, 8'ha8, 8'hc9, 8'hee, 8'h25, 8'h89,
          8'he1, 8'h3f, 8'h0c, 8'hc8, 8'hb6, 8'h63, 8'h0c, 8'ha6};
    run_key(key);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); load = 1; kin = key[k];
    end
    @(negedge clk); load = 0;
    for (int r = 1; r <= 9; r++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk); shift = 1; step = 1; inv = 0; seq = 4'(k); rnd = 4'(r);
      end
      @(negedge clk); shift = 0; step = 0;
    end
    pass(1, 0, 4'd10, e);
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < 16; k++) key[k] = 8'($urandom);
      run_key(key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
