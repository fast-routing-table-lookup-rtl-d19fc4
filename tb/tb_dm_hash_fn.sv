// tb_dm_hash_fn: checks the two index-table hash functions against an arithmetic
// model. With expansion to 23 bits and a 16K-entry table, p is the address divided by
// 2^9; the first hash is p mod 2^14, the second is that XOR (p / 2^14) mod 2^14.
// Random and corner-case addresses are tried, at the default size and at expansion to
// 24 bits with a 4K-entry table.
module tb_dm_hash_fn;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic [31:0] dst;
  logic [13:0] h1, h2;
  logic [11:0] g1, g2;
  int checks = 0, failures = 0;

  dm_hash_fn dut (.dst(dst), .h1(h1), .h2(h2));
  dm_hash_fn #(.PFX_LEN(24), .IDX_AW(12)) dut24 (.dst(dst), .h1(g1), .h2(g2));

  task automatic check_one(logic [31:0] a);
    longint unsigned p, q, e1, e2, f1, f2;
    dst = a;
    @(posedge clk);
    p  = longint'(a) / 512;
    e1 = p % 16384;
    e2 = e1 ^ ((p / 16384) % 16384);
    q  = longint'(a) / 256;
    f1 = q % 4096;
    f2 = f1 ^ ((q / 4096) % 4096);
    checks += 4;
    if (h1 != 14'(e1)) begin failures++; $display("ERROR h1 %h: %h vs %h", a, h1, e1); end
    if (h2 != 14'(e2)) begin failures++; $display("ERROR h2 %h: %h vs %h", a, h2, e2); end
    if (g1 != 12'(f1)) begin failures++; $display("ERROR g1 %h: %h vs %h", a, g1, f1); end
    if (g2 != 12'(f2)) begin failures++; $display("ERROR g2 %h: %h vs %h", a, g2, f2); end
  endtask

  initial begin
    check_one(32'h0000_0000);
    check_one(32'hffff_ffff);
    check_one(32'h8000_0000);
    check_one(32'h0000_0200);
    check_one(32'h0000_01ff);
    repeat (2000) check_one($urandom);
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
