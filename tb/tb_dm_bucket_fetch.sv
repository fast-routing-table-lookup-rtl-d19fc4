// tb_dm_bucket_fetch: drives the bucket fetch unit (default size: 512K buckets of 3
// slots, 2 SRAM words each) against an SRAM model whose word at address a is a fixed
// scramble of a, returning data in order after a latency that is short in the first
// phase and long (so the in-flight queue fills) in the second. Checks every gathered
// bucket and its side information, that each bucket is read at words 2b and 2b+1,
// that back-to-back requests are accepted every 2 cycles, and that requests are held
// off while the in-flight queue is full.
module tb_dm_bucket_fetch;
  localparam int WPB = 2;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic        req_valid = 1'b0;
  logic        req_ready;
  logic [18:0] req_bucket = '0;
  logic [31:0] req_meta = '0;
  logic        sram_rd_en;
  logic [19:0] sram_rd_addr;
  logic        sram_rd_valid;
  logic [71:0] sram_rd_data;
  logic        rsp_valid;
  logic [143:0] rsp_bucket;
  logic [31:0] rsp_meta;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int lat = 3;

  dm_bucket_fetch dut (.*);

  function automatic logic [71:0] word_of(logic [19:0] a);
    logic [31:0] x;
    x = 32'(a) * 32'h9E37_79B1;
    return {x, 20'(a) ^ 20'h5a5a5, 20'(a)};
  endfunction

  // SRAM model: in-order, latency lat cycles
  typedef struct { longint due; logic [19:0] addr; } rd_t;
  rd_t rq[$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && sram_rd_en) rq.push_back('{cycle + lat, sram_rd_addr});
  end
  always @(negedge clk) begin
    sram_rd_valid = 1'b0;
    if (rq.size() > 0 && rq[0].due <= cycle) begin
      rd_t r;
      r = rq.pop_front();
      sram_rd_valid = 1'b1;
      sram_rd_data  = word_of(r.addr);
    end
  end

  // scoreboard
  typedef struct { logic [18:0] b; logic [31:0] m; } req_t;
  req_t exp_q[$];
  bit   accepted = 0;
  bit   burst = 0;
  longint last_acc = -1;
  int   gaps = 0, bad_gaps = 0, full_stalls = 0, n_rsp = 0;

  always @(posedge clk) begin
    accepted = rst_n && req_valid && req_ready;
    if (rst_n && req_valid && !req_ready && !dut.busy) full_stalls++;
    if (accepted) begin
      exp_q.push_back('{req_bucket, req_meta});
      if (burst && lat < 10 && last_acc >= 0) begin
        gaps++;
        if (cycle - last_acc != WPB) bad_gaps++;
      end
      last_acc = burst ? cycle : -1;
    end
    if (rst_n && sram_rd_en && exp_q.size() == 0) begin
      failures++; $display("ERROR: read with nothing requested");
    end
    if (rst_n && rsp_valid) begin
      req_t e;
      n_rsp++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("ERROR: unexpected response"); end
      else begin
        e = exp_q.pop_front();
        if (rsp_meta != e.m || rsp_bucket != {word_of({e.b, 1'b1}), word_of({e.b, 1'b0})}) begin
          failures++;
          if (failures < 10) $display("ERROR: bucket %h meta %h: got meta %h data %h", e.b, e.m, rsp_meta, rsp_bucket);
        end
      end
    end
  end

  task automatic run(int n, bit b2b);
    int sent = 0;
    burst = b2b;
    last_acc = -1;
    while (sent < n || (req_valid && !accepted)) begin
      @(negedge clk);
      if (!req_valid || accepted) begin
        if (sent < n && (b2b || $urandom_range(1) == 0)) begin
          req_valid = 1'b1; req_bucket = 19'($urandom); req_meta = $urandom; sent++;
        end else req_valid = 1'b0;
      end
    end
    @(negedge clk);
    while (req_valid && !accepted) @(negedge clk);
    req_valid = 1'b0;
    burst = 0;
    repeat (lat + 10) @(negedge clk);
  endtask

  initial begin
    sram_rd_valid = 1'b0;
    sram_rd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(500, 0);
    run(500, 1);
    lat = 40;
    run(300, 1);
    repeat (100) @(negedge clk);
    checks++;
    if (n_rsp != 1300 || exp_q.size() != 0) begin failures++; $display("ERROR: %0d responses", n_rsp); end
    checks++;
    if (gaps == 0 || bad_gaps != 0) begin failures++; $display("ERROR: %0d of %0d burst gaps differ from %0d", bad_gaps, gaps, WPB); end
    checks++;
    if (full_stalls == 0) begin failures++; $display("ERROR: in-flight queue never filled"); end
    $display("responses=%0d burst gaps=%0d (bad %0d) full-queue stalls=%0d", n_rsp, gaps, bad_gaps, full_stalls);
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
