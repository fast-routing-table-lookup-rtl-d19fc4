// tb_dm_bucket_search: builds random buckets and checks the search result against a
// longest-prefix match over the bucket's valid slots. Two instances are tested: the
// default (expansion to 23, 3 slots in 144 bits, 2-bit flags {valid, 24-length}) and
// expansion to 22 with 5 slots (216 bits, 3-bit flags). Slots hold prefixes of every
// length the configuration allows, often sharing leading bits so that several match;
// some slots are invalid, and in the second configuration some carry length 21,
// below the expansion length, which must never match. Addresses are taken under each slot and at random.
module tb_dm_bucket_search;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic [143:0] bkt_a;
  logic [215:0] bkt_b;
  logic [31:0]  dst;
  logic         hit_a, hit_b;
  logic [5:0]   len_a, len_b;
  logic [15:0]  port_a, port_b;
  int checks = 0, failures = 0;
  int n_len [33];
  int n_miss = 0;

  dm_bucket_search dut (.bucket(bkt_a), .dst(dst), .hit(hit_a), .len(len_a), .port(port_a));
  dm_bucket_search #(.PFX_LEN(22), .OMEGA(5)) dut22 (.bucket(bkt_b), .dst(dst), .hit(hit_b), .len(len_b), .port(port_b));

  logic [23:0] s_pfx [2][5];
  logic [15:0] s_port [2][5];
  bit          s_val [2][5];
  int          s_len [2][5];

  // fill configuration c (0: /23 x3, 1: /22 x5) and return its bucket image
  function automatic logic [215:0] build(int c, logic [23:0] base);
    int omega, plen, fw;
    logic [215:0] img;
    logic [7:0] flag;
    omega = c ? 5 : 3; plen = c ? 22 : 23; fw = c ? 3 : 2;
    img = '0;
    for (int j = 0; j < omega; j++) begin
      s_len[c][j] = plen + $urandom_range(24 - plen);
      if (c == 1 && $urandom_range(9) == 0) s_len[c][j] = plen - 1;   // not allowed: must not match
      s_val[c][j] = $urandom_range(4) != 0;
      s_pfx[c][j] = ($urandom_range(2) != 0) ? base : 24'($urandom);
      s_pfx[c][j] &= ~((24'h1 << (24 - s_len[c][j])) - 1);
      s_port[c][j] = 16'($urandom);
      img[j*40 +: 40] = {s_pfx[c][j], s_port[c][j]};
      flag = 8'(24 - s_len[c][j]);
      if (s_val[c][j]) flag = flag | 8'(1 << (fw - 1));
      for (int b = 0; b < fw; b++) img[omega*40 + j*fw + b] = flag[b];
    end
    return img;
  endfunction

  task automatic check(int c, logic hit, logic [5:0] len, logic [15:0] port);
    int omega, plen, best_len, best_j;
    omega = c ? 5 : 3; plen = c ? 22 : 23;
    best_len = 0; best_j = -1;
    for (int j = 0; j < omega; j++)
      if (s_val[c][j] && s_len[c][j] >= plen &&
          (dst >> (32 - s_len[c][j])) == (32'(s_pfx[c][j]) >> (24 - s_len[c][j])) &&
          s_len[c][j] > best_len) begin
        best_len = s_len[c][j]; best_j = j;
      end
    checks++;
    if (best_j < 0) begin
      n_miss++;
      if (hit) begin failures++; $display("ERROR cfg %0d: false hit for %h", c, dst); end
    end else begin
      n_len[best_len]++;
      if (!hit || port != s_port[c][best_j] || len != 6'(best_len)) begin
        failures++;
        if (failures < 10) $display("ERROR cfg %0d: %h got %0d/%h/%0d expected slot %0d len %0d", c, dst, hit, port, len, best_j, best_len);
      end
    end
  endtask

  initial begin
    repeat (3000) begin
      logic [23:0] base;
      logic [215:0] img;
      base = 24'($urandom);
      img = build(0, base); bkt_a = img[143:0];
      bkt_b = build(1, base);
      for (int t = 0; t < 6; t++) begin
        dst = (t < 5) ? {s_pfx[t % 2][t % 3], 8'($urandom)} : $urandom;
        if (t < 5 && $urandom_range(1) == 0) dst[8 + $urandom_range(3)] ^= 1'b1;
        @(posedge clk);
        check(0, hit_a, len_a, port_a);
        check(1, hit_b, len_b, port_b);
      end
    end
    checks++;
    if (n_len[22] == 0 || n_len[23] == 0 || n_len[24] == 0 || n_miss == 0) failures++;
    $display("matches /22=%0d /23=%0d /24=%0d misses=%0d", n_len[22], n_len[23], n_len[24], n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
