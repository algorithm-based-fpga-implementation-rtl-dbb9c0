// tb_wimax_deinterleaver: end-to-end test of the deinterleaver at its
// default parameters.
//
// Every entry of the depth table (19 blocks), followed by a few repeats, is
// sent through the deinterleaver. Each block is a random bit vector b; the
// testbench interleaves it with the standard's forward permutation
// (reference package), so received bit j = ref_interleave(k) carries b[k],
// and expects b back in its original order, one block after another, with
// out_last_o on the final bit of each block.
//
// Timing: the first bit of a block must appear exactly three clocks after
// the clock that accepted its last input bit, or on the clock right after
// the previous block's last output bit, whichever is later.
//
// Mechanisms that must each happen at least once (counted, and a failure if
// one never does): bank swap M-1 -> M-2 and M-2 -> M-1, writer stall while
// the reader is busy (a large block followed by a small one), refused
// configuration (cfg_err_o), simultaneous write and read, a block accepted
// back to back with the previous one, input gaps within a block, and blocks
// of each modulation. Finally four equal 432-bit blocks are sent without
// gaps; from the second on, none may be stalled.
module tb_wimax_deinterleaver;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_t  mod_in  = MOD_QPSK;
  rate_t rate_in = RATE_1_2;
  logic [2:0] size_in = '0;
  logic in_valid = 1'b0;
  logic [0:0] in_data = '0;
  logic in_ready, out_valid, out_last, sel, cfg_err;
  logic [0:0] out_data;

  wimax_deinterleaver dut (
    .clk (clk), .rst_n (rst_n),
    .mod_i (mod_in), .rate_i (rate_in), .size_i (size_in),
    .in_valid_i (in_valid), .in_data_i (in_data), .in_ready_o (in_ready),
    .out_valid_o (out_valid), .out_data_o (out_data), .out_last_o (out_last),
    .sel_o (sel), .cfg_err_o (cfg_err)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- watchdog -------------------------------------------------------------
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- expected data and block bookkeeping -----------------------------------
  logic [0:0] exp_q[$];
  int in_len_q[$], out_len_q[$];
  int acc_cycle_q[$];               // clock of each block's last accepted bit

  // ---- mechanism counters ---------------------------------------------------
  int n_swap_12 = 0, n_swap_21 = 0, n_stall = 0, n_cfg_err = 0, n_overlap = 0;
  int n_back_to_back = 0, n_gap = 0, n_mod [3] = '{0, 0, 0};

  // ---- monitor ---------------------------------------------------------------------
  int cyc = 0, in_cnt = 0, out_cnt = 0, last_out_cyc = -100, last_acc_cyc = -100;
  logic sel_prev = 1'b1;
  bit mid_block = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (sel != sel_prev) begin
        if (sel_prev) n_swap_12++; else n_swap_21++;
      end
      sel_prev <= sel;
      if (in_valid && !in_ready && !cfg_err) n_stall++;
      if (in_valid && cfg_err) n_cfg_err++;
      if (!in_valid && mid_block) n_gap++;
      if (in_valid && in_ready) begin
        if (in_cnt == 0 && last_acc_cyc == cyc - 1) n_back_to_back++;
        if (out_valid) n_overlap++;
        in_cnt++;
        mid_block = 1;
        last_acc_cyc = cyc;
        if (in_len_q.size() != 0 && in_cnt == in_len_q[0]) begin
          acc_cycle_q.push_back(cyc);
          void'(in_len_q.pop_front());
          in_cnt = 0;
          mid_block = 0;
        end
      end
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0 || out_len_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output at clock %0d", cyc);
        end else begin
          logic [0:0] want;
          want = exp_q.pop_front();
          out_cnt++;
          if (out_data != want || out_last != (out_cnt == out_len_q[0])) begin
            failures++;
            if (failures < 20)
              $display("FAIL clock %0d bit %0d of %0d: data=%0d last=%0d, want %0d",
                       cyc, out_cnt - 1, out_len_q[0], out_data, out_last, want);
          end
          if (out_cnt == 1) begin
            int want_cyc;
            checks++;
            if (acc_cycle_q.size() == 0) begin
              failures++;
              $display("FAIL block output started before its input was complete");
            end else begin
              want_cyc = acc_cycle_q.pop_front() + 3;
              if (last_out_cyc + 1 > want_cyc) want_cyc = last_out_cyc + 1;
              if (cyc != want_cyc) begin
                failures++;
                $display("FAIL block of %0d bits started at clock %0d, want %0d", out_len_q[0], cyc, want_cyc);
              end
            end
          end
          if (out_cnt == out_len_q[0]) begin
            void'(out_len_q.pop_front());
            out_cnt = 0;
            last_out_cyc = cyc;
          end
        end
      end
    end
  end

  // ---- driver ----------------------------------------------------------------------
  task automatic send_block(input int m, input int r, input int z, input bit gaps);
    int ncbps = ref_ncbps(m, r, z);
    logic [0:0] orig [576];
    logic [0:0] rx [576];
    int idx = 0;
    for (int k = 0; k < ncbps; k++) begin
      orig[k] = 1'($urandom);
      rx[ref_interleave(ncbps, ref_s(m), k)] = orig[k];
      exp_q.push_back(orig[k]);
    end
    in_len_q.push_back(ncbps);
    out_len_q.push_back(ncbps);
    n_mod[m]++;
    while (idx < ncbps) begin
      @(negedge clk);
      mod_in = mod_t'(m); rate_in = rate_t'(r); size_in = 3'(z);
      in_valid = gaps ? (($urandom % 3) != 0) : 1'b1;
      in_data = rx[idx];
      #1;
      if (in_valid && in_ready) idx++;
    end
  endtask

  // Offers a bit with a configuration outside the depth table; it must be
  // refused.
  task automatic send_bad_cfg(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      mod_in = MOD_QPSK; rate_in = RATE_2_3; size_in = 3'd0;
      in_valid = 1'b1;
      #1;
      checks++;
      if (in_ready) begin
        failures++;
        $display("FAIL configuration outside the table accepted");
      end
    end
  endtask

  initial begin
    int m, r, z, nb, stall_at_start;
    int order [19][3];
    int mr [7][2];
    // all table entries, largest QPSK blocks before small ones to force stalls
    mr = '{'{0, 0}, '{2, 2}, '{1, 0}, '{0, 2}, '{2, 0}, '{1, 2}, '{2, 1}};
    nb = 0;
    foreach (mr[c]) begin
      for (int zz = 5; zz >= 0; zz--)
        if (ref_ncbps(mr[c][0], mr[c][1], zz) != 0) begin
          order[nb] = '{mr[c][0], mr[c][1], zz};
          nb++;
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 19; b++) begin
      if (b == 7) send_bad_cfg(4);
      send_block(order[b][0], order[b][1], order[b][2], (b % 4) == 3);
    end
    // a few random repeats, with and without gaps
    repeat (6) begin
      do begin
        m = $urandom % 3; r = $urandom % 3; z = $urandom % 6;
      end while (ref_ncbps(m, r, z) == 0);
      send_block(m, r, z, 1'($urandom));
    end
    // full throughput: equal blocks without gaps must never stall once the
    // first of them is being written
    send_block(2, 2, 0, 0);
    stall_at_start = n_stall;
    send_block(2, 2, 0, 0);
    send_block(2, 2, 0, 0);
    send_block(2, 2, 0, 0);
    checks++;
    if (n_stall != stall_at_start) begin
      failures++;
      $display("FAIL %0d stalls while streaming equal blocks", n_stall - stall_at_start);
    end
    @(negedge clk);
    in_valid = 1'b0;
    // drain
    for (int t = 0; t < 5000 && exp_q.size() != 0; t++) @(negedge clk);
    repeat (5) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d bits never came out", exp_q.size());
    end
    $display("mechanisms: swap M-1->M-2 %0d, swap M-2->M-1 %0d, stall %0d, refused config %0d, overlap %0d, back-to-back %0d, gaps %0d, QPSK %0d, 16-QAM %0d, 64-QAM %0d",
             n_swap_12, n_swap_21, n_stall, n_cfg_err, n_overlap, n_back_to_back, n_gap, n_mod[0], n_mod[1], n_mod[2]);
    foreach (n_mod[q]) begin
      checks++;
      if (n_mod[q] == 0) begin failures++; $display("FAIL no block of modulation %0d", q); end
    end
    checks += 7;
    if (n_swap_12 == 0)      begin failures++; $display("FAIL no swap M-1 -> M-2"); end
    if (n_swap_21 == 0)      begin failures++; $display("FAIL no swap M-2 -> M-1"); end
    if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    if (n_cfg_err == 0)      begin failures++; $display("FAIL no refused configuration"); end
    if (n_overlap == 0)      begin failures++; $display("FAIL no simultaneous write and read"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back block"); end
    if (n_gap == 0)          begin failures++; $display("FAIL no input gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
