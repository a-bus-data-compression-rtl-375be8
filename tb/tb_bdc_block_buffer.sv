// tb_bdc_block_buffer: random groups of one to four words with random last
// flags are written, with random read back-pressure; each 16-bit piece read
// (data, word count, last flag) is compared with a reference list.  A phase
// with reads held off checks that the buffer takes exactly DEPTH groups and
// then refuses further writes.
module tb_bdc_block_buffer;
  localparam int DEPTH = 64;
  logic        clk = 0, rst_n = 0;
  logic        wr_valid, wr_ready;
  logic [31:0] wr_data;
  logic [2:0]  wr_nwords;
  logic        wr_last;
  logic        rd_valid, rd_ready;
  logic [15:0] rd_data;
  logic [1:0]  rd_nwords;
  logic        rd_last;
  logic [6:0]  level;
  int checks = 0, failures = 0;
  int exp_q[$];   // data | nwords << 16 | last << 20
  int mode;       // 0 random, 1 hold reads, 2 drain

  bdc_block_buffer #(.WORD_W(8), .IN_WORDS(4), .OUT_WORDS(2), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      int n;
      n = int'(wr_nwords);
      for (int k = 0; 2 * k < n; k++) begin
        int m;
        m = (n - 2 * k >= 2) ? 2 : 1;
        exp_q.push_back(int'(16'(wr_data[k*16 +: 16] & ((m == 2) ? 16'hffff : 16'h00ff))) |
                        (m << 16) | (int'(wr_last && (2 * k + 2 >= n)) << 20));
      end
    end
    if (rst_n && rd_valid && rd_ready) begin
      int gotv, e;
      gotv = int'(16'(rd_data & ((rd_nwords == 2) ? 16'hffff : 16'h00ff))) |
             (int'(rd_nwords) << 16) | (int'(rd_last) << 20);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("read with nothing expected");
      end else begin
        e = exp_q.pop_front();
        if (gotv != e) begin
          failures++;
          $display("read %h expected %h", gotv, e);
        end
      end
    end
  end

  always @(negedge clk) begin
    rd_ready <= (mode == 1) ? 1'b0 : ($urandom_range(0, 2) != 0);
    wr_valid <= (mode != 2) && ($urandom_range(0, 2) != 0);
    wr_data  <= $urandom;
    wr_nwords <= 3'($urandom_range(1, 4));
    wr_last  <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    int accepted;
    mode = 0;
    rd_ready = 0; wr_valid = 0; wr_data = 0; wr_nwords = 1; wr_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    // fill with reads held off
    mode = 2;
    @(posedge clk);
    while (level != 0 || rd_valid) @(posedge clk);
    mode = 1;
    accepted = 0;
    repeat (400) begin
      @(posedge clk);
      if (wr_valid && wr_ready) accepted++;
    end
    checks++;
    if (accepted != DEPTH || wr_ready || int'(level) != DEPTH) begin
      failures++;
      $display("full buffer took %0d groups, wr_ready=%0d level=%0d", accepted, wr_ready, level);
    end
    mode = 2;
    repeat (2000) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || level != 0) begin
      failures++;
      $display("buffer did not drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
