// tb_buffer_manager: buffer manager plus buffer RAM.
// Mode 0: the host writes 10 random sectors with random gaps while the flash
// side drains with random back-pressure; the flash stream must equal the host
// stream, and the host must see ready low while all four buffers are full.
// Mode 1: the flash side writes 10 sectors; for each, a few corrections
// (including one aimed at a parity byte) are sent and then corr_done; the
// host stream must equal data XOR corrections and must not start a sector
// before its corr_done. Finally a streaming run checks one byte per clock.
module tb_buffer_manager;
  localparam int NS = 10, SB = 512;
  logic clk = 0, rst_n = 0, mode = 0, flush = 0;
  logic hw_valid = 0, hr_ready = 0, ft_ready = 0, fr_valid = 0;
  logic [7:0] hw_data = '0, fr_data = '0;
  logic hw_ready, hr_valid, ft_valid, fr_ready, corr_ready;
  logic [7:0] hr_data, ft_data;
  logic corr_valid = 0, corr_done = 0;
  logic [9:0] corr_index = '0;
  logic [7:0] corr_mask = '0;
  logic [3:0] free_bufs, ready_secs;
  logic a_en, a_we, b_en, b_we;
  logic [10:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  buffer_manager dut (.*);
  buffer_ram u_ram (.*);

  always #5 clk = ~clk;

  logic [7:0] src [NS*SB];
  logic [7:0] exp_q [$];
  int got, stalls_full, early;
  bit  chk_rate;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // sink: flash side in mode 0, host side in mode 1
  always @(posedge clk) begin
    if (ft_valid && ft_ready) begin
      check(ft_data === exp_q[0], $sformatf("mode0 byte %0d", got)); void'(exp_q.pop_front()); got++;
    end
    if (hr_valid && hr_ready) begin
      check(hr_data === exp_q[0], $sformatf("mode1 byte %0d", got)); void'(exp_q.pop_front()); got++;
    end
    if (hw_valid && !hw_ready && free_bufs == 0) stalls_full++;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------- mode 0 ----------
    foreach (src[i]) begin src[i] = 8'($urandom); exp_q.push_back(src[i]); end
    got = 0;
    fork
      begin
        for (int i = 0; i < NS * SB; i++) begin
          @(negedge clk);
          hw_valid = ($urandom % 5) != 0; hw_data = src[i];
          while (!(hw_valid && hw_ready)) begin
            @(negedge clk); hw_valid = ($urandom % 5) != 0;
          end
          @(posedge clk); #1 hw_valid = 0;
        end
        hw_valid = 0;
      end
      begin
        // hold the flash side off until the buffers are full
        while (free_bufs != 0) @(negedge clk);
        repeat (20) @(negedge clk);
        while (got < NS * SB) begin @(negedge clk); ft_ready = ($urandom % 3) != 0; end
        ft_ready = 0;
      end
    join
    check(got == NS * SB, "mode0 count");
    check(stalls_full > 0, "host stalled on full buffers");
    // ---------- mode 1 ----------
    @(negedge clk) mode = 1;
    @(negedge clk);
    exp_q.delete(); got = 0; early = 0;
    fork
      begin
        for (int s = 0; s < NS; s++) begin
          logic [7:0] sec [SB];
          for (int i = 0; i < SB; i++) sec[i] = 8'($urandom);
          for (int i = 0; i < SB; i++) begin
            @(negedge clk); fr_valid = 1; fr_data = sec[i];
            while (!fr_ready) @(negedge clk);
            @(posedge clk); #1 fr_valid = 0;
          end
          // corrections: 3 in-sector bytes and one parity byte
          for (int c = 0; c < 4; c++) begin
            int idx; logic [7:0] msk;
            idx = (c == 3) ? 514 : ($urandom % SB); msk = 8'($urandom) | 8'h01;
            if (c < 3) sec[idx] ^= msk;
            @(negedge clk); corr_valid = 1; corr_index = 10'(idx); corr_mask = msk;
            @(posedge clk); while (!corr_ready) @(posedge clk);
            #1 corr_valid = 0;
          end
          check(ready_secs == 0 || got > 0 || s > 0, "not released before corr_done");
          if (got < s * SB) early++;
          foreach (sec[i]) exp_q.push_back(sec[i]);
          @(negedge clk) corr_done = 1;
          @(negedge clk) corr_done = 0;
        end
      end
      begin
        while (got < NS * SB) begin
          @(negedge clk); hr_ready = ($urandom % 4) != 0;
          if (hr_valid && exp_q.size() == 0) check(0, "host byte before release");
        end
        hr_ready = 0;
      end
    join
    check(got == NS * SB, "mode1 count");
    // ---------- throughput: mode 0, both sides always ready ----------
    @(negedge clk) mode = 0; flush = 1;
    @(negedge clk) flush = 0;
    exp_q.delete(); got = 0;
    for (int i = 0; i < 4 * SB; i++) exp_q.push_back(8'(i));
    ft_ready = 1; cyc = 0;
    fork
      for (int i = 0; i < 4 * SB; i++) begin
        @(negedge clk); hw_valid = 1; hw_data = 8'(i);
        while (!hw_ready) @(negedge clk);
      end
      while (got < 4 * SB) begin @(negedge clk); cyc++; end
    join
    hw_valid = 0;
    // the first sector must be complete before it drains: one sector of fill latency
    check(cyc <= 5 * SB + 8 && cyc >= 5 * SB - 8, $sformatf("streaming took %0d clocks for %0d bytes", cyc, 4 * SB));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
