// tb_dm_index_table: loads the full 16K x 24-bit index table with random words through
// the write port, then reads random address pairs and checks that both words arrive
// exactly one cycle after rd_en, that rd_data holds while rd_en is low, and that a
// later write is seen by a later read.
module tb_dm_index_table;
  localparam int N = 16384;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic        rd_en = 1'b0;
  logic [13:0] rd_addr [2];
  logic [23:0] rd_data [2];
  logic        wr_en = 1'b0;
  logic [13:0] wr_addr = '0;
  logic [23:0] wr_data = '0;
  logic [23:0] model [N];
  int checks = 0, failures = 0;

  dm_index_table dut (.*);

  task automatic expect_data(logic [23:0] e0, logic [23:0] e1, string what);
    checks += 2;
    if (rd_data[0] != e0) begin failures++; $display("ERROR %s port0: %h vs %h", what, rd_data[0], e0); end
    if (rd_data[1] != e1) begin failures++; $display("ERROR %s port1: %h vs %h", what, rd_data[1], e1); end
  endtask

  initial begin
    logic [13:0] a0, a1;
    rd_addr[0] = '0; rd_addr[1] = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      model[i] = 24'($urandom);
      wr_en = 1'b1; wr_addr = 14'(i); wr_data = model[i];
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      a0 = 14'($urandom); a1 = 14'($urandom);
      rd_en = 1'b1; rd_addr[0] = a0; rd_addr[1] = a1;
      @(negedge clk);
      rd_en = 1'b0;
      expect_data(model[a0], model[a1], "read");
      // hold: change addresses without rd_en, data must stay
      rd_addr[0] = ~a0; rd_addr[1] = ~a1;
      @(negedge clk);
      expect_data(model[a0], model[a1], "hold");
      if (t % 10 == 0) begin
        // overwrite one word, then read it back
        model[a0] = 24'($urandom);
        wr_en = 1'b1; wr_addr = a0; wr_data = model[a0];
        @(negedge clk);
        wr_en = 1'b0;
        rd_en = 1'b1; rd_addr[0] = a1; rd_addr[1] = a0;
        @(negedge clk);
        rd_en = 1'b0;
        expect_data(model[a1], model[a0], "rewrite");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
