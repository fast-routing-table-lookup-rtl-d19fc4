// tb_dm_result_select: tries every combination of TCAM hit/length class and hash hit/
// length and checks the longest-prefix choice: TCAM /25../32 first, then the hash
// table (/24 reported apart from shorter expanded prefixes), then TCAM /8../18, else
// no route.
module tb_dm_result_select;
  import dm_pkg::*;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic             tcam_hit, hash_hit, hit;
  logic [LEN_W-1:0] tcam_len, hash_len;
  logic [15:0]      tcam_port, hash_port, port;
  src_e             src;
  int checks = 0, failures = 0;

  dm_result_select dut (.*);

  initial begin
    int lens [6] = '{8, 12, 18, 25, 30, 32};
    int hlens [4] = '{21, 22, 23, 24};
    for (int th = 0; th < 2; th++)
      for (int li = 0; li < 6; li++)
        for (int hh = 0; hh < 2; hh++)
          for (int hl = 0; hl < 4; hl++)
            repeat (5) begin
              bit e_hit; logic [15:0] e_port; src_e e_src;
              tcam_hit = th[0]; tcam_len = LEN_W'(lens[li]); tcam_port = 16'($urandom);
              hash_hit = hh[0]; hash_len = LEN_W'(hlens[hl]); hash_port = 16'($urandom);
              @(posedge clk);
              if (th == 1 && lens[li] >= 25) begin e_hit = 1; e_port = tcam_port; e_src = SRC_TCAM_LONG; end
              else if (hh == 1) begin e_hit = 1; e_port = hash_port; e_src = (hlens[hl] == 24) ? SRC_HASH_24 : SRC_HASH_SHORT; end
              else if (th == 1) begin e_hit = 1; e_port = tcam_port; e_src = SRC_TCAM_SHORT; end
              else begin e_hit = 0; e_port = port; e_src = SRC_NONE; end
              checks++;
              if (hit != e_hit || port != e_port || src != e_src) begin
                failures++;
                $display("ERROR: tcam %0d/%0d hash %0d/%0d: got %0d %h %s", th, lens[li], hh, hlens[hl], hit, port, src.name());
              end
            end
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
