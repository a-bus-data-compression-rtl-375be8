// tb_bdc_sram_writer: a memory model applies every SRAM write with its word
// mask.  Random write bursts (1..256 bytes, random start groups) are offered as
// groups with random gaps while the read side takes the port at random
// (grant low).  After each burst the whole memory must equal an expected
// copy: the burst's bytes in place, the bytes beyond a partial last group and
// everything else unchanged.  Read headers must be ignored, and with the port
// always granted one group is written per clock.
module tb_bdc_sram_writer;
  import bdc_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        hdr_valid;
  ctrl_word_t  hdr_ctrl;
  logic [31:0] hdr_addr;
  logic        in_valid, in_ready;
  logic [31:0] in_data;
  logic [2:0]  in_nwords;
  logic        in_last;
  logic        grant;
  logic        sram_we;
  logic [11:0] sram_addr;
  logic [31:0] sram_wdata;
  logic [3:0]  sram_wmask;
  logic        busy;
  logic [31:0] mem [4096];
  logic [31:0] expect_mem [4096];
  int checks = 0, failures = 0;
  bit stall_mode;
  int writes, cycles;

  bdc_sram_writer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (sram_we) begin
      writes++;
      for (int i = 0; i < 4; i++) if (sram_wmask[i]) mem[sram_addr][i*8 +: 8] <= sram_wdata[i*8 +: 8];
    end
  end
  always @(negedge clk) grant <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    foreach (mem[i]) begin
      mem[i] = $urandom;
      expect_mem[i] = mem[i];
    end
    hdr_valid = 0; hdr_ctrl = '0; hdr_addr = '0; in_valid = 0; in_data = '0;
    in_nwords = '0; in_last = 0; stall_mode = 0; grant = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int len, ngroups, start, sent;
      bit rd;
      byte unsigned d[$];
      stall_mode = it[0];
      rd      = (it % 10 == 7);
      len     = (it % 6 == 0) ? 256 : $urandom_range(1, 256);
      ngroups = (len + 3) / 4;
      start   = $urandom_range(0, 4095 - ngroups);
      d.delete();
      repeat (len) d.push_back(8'($urandom));
      writes = 0;
      @(negedge clk);
      hdr_valid        = 1;
      hdr_ctrl         = '0;
      hdr_ctrl.cmp_en  = 1'($urandom);
      hdr_ctrl.traffic = rd ? TR_READ : 2'($urandom_range(2, 3));
      if (it % 3 == 0 && !rd) hdr_ctrl.traffic = TR_WRITE;
      hdr_ctrl.len_m1  = 8'(len - 1);
      hdr_addr         = 32'(start * 4);
      @(negedge clk);
      hdr_valid = 0;
      if (rd) begin
        repeat (5) @(negedge clk);
        check(!busy && writes == 0, $sformatf("burst %0d: read header started a write", it));
        continue;
      end
      for (int i = 0; i < len; i++) expect_mem[start + i / 4][(i % 4)*8 +: 8] = d[i];
      sent   = 0;
      cycles = 0;
      while (sent < len) begin
        in_valid  = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
        in_nwords = 3'((len - sent >= 4) ? 4 : len - sent);
        in_last   = (len - sent <= 4);
        for (int i = 0; i < 4; i++) in_data[i*8 +: 8] = (sent + i < len) ? d[sent + i] : 8'($urandom);
        @(posedge clk);
        cycles++;
        if (in_valid && in_ready) sent += 4;
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      check(!busy, $sformatf("burst %0d: still busy after the last group", it));
      check(writes == ngroups, $sformatf("burst %0d: %0d writes, expected %0d", it, writes, ngroups));
      if (!stall_mode) check(cycles == ngroups, $sformatf("burst %0d: %0d groups took %0d cycles", it, ngroups, cycles));
      for (int g = 0; g < 4096; g++)
        if (mem[g] != expect_mem[g]) begin
          check(0, $sformatf("burst %0d: SRAM word %0d is %h, expected %h", it, g, mem[g], expect_mem[g]));
          break;
        end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
