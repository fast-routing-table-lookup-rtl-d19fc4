// tb_dm_bucket_id: checks that the bucket ID is the XOR of the two 24-bit index entries
// reduced modulo m = 2^19, for random and corner-case entries.
module tb_dm_bucket_id;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic [23:0] entry [2];
  logic [18:0] bucket;
  int checks = 0, failures = 0;

  dm_bucket_id dut (.entry(entry), .bucket(bucket));

  task automatic check_one(logic [23:0] a, logic [23:0] b);
    int unsigned exp_b;
    entry[0] = a;
    entry[1] = b;
    @(posedge clk);
    exp_b = 0;
    for (int i = 0; i < 19; i++)
      if (a[i] != b[i]) exp_b += (1 << i);
    checks++;
    if (bucket != 19'(exp_b)) begin
      failures++;
      $display("ERROR: %h ^ %h gave %h, expected %h", a, b, bucket, exp_b);
    end
  endtask

  initial begin
    check_one(24'h0, 24'h0);
    check_one(24'hffffff, 24'h0);
    check_one(24'h123456, 24'h123456);
    check_one(24'h7ffff, 24'h80000);
    repeat (2000) check_one(24'($urandom), 24'($urandom));
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
