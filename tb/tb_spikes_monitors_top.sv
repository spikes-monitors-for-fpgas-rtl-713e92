// tb_spikes_monitors_top: both monitors at their default sizes (16 neurons x
// 2 = 32 spike lines, 16-word Spikes and partial FIFOs, 1024-event AER
// FIFOs), driven by the same random stimulus, each answered by its own
// event logger.
//
// Stimulus follows the comparison experiment: in each clock cycle, with
// probability p, K distinct random lines fire together; p is chosen so that
// the average spike rate is RATE Mspikes/s at a 50 MHz clock
// (p = RATE / (50 x K)). The sweep covers RATE = 2, 5, 10, 20 and K = 8, 16,
// plus one point with K = 2 where the MSM's serial scan is the bottleneck.
// After each point the stimulus stops and both monitors drain.
//
// Checks per point: MSM events equal the accepted snapshots in order
// (ascending line order inside a snapshot); DSM events never exceed a line's
// spikes; for both, spikes in = events out + spikes reported lost; the AER
// protocol is respected; at the lowest rate the MSM loses nothing and the
// DSM under 3% (a line that fires again before its scanner reaches it). It also counts
// how often each mechanism occurred (simultaneous spikes, Spikes FIFO
// overflow, DSM merge loss, AER FIFO full back-pressure in either monitor,
// a full DSM partial FIFO) and fails if one never did. Output rate and loss
// ratio of each point are printed.
module tb_spikes_monitors_top;
  localparam int unsigned W = 32;
  localparam int unsigned T_STIM = 20000;   // cycles of stimulus per point
  logic clk = 0, rst_n = 0;
  logic [W-1:0] spikes = '0;
  logic msm_req_n, msm_ack_n, msm_oe, dsm_req_n, dsm_ack_n, dsm_oe;
  logic [15:0] msm_data, dsm_data;
  logic [5:0] msm_lost, dsm_lost;
  logic mg, dg; logic [15:0] mgd, dgd;
  int unsigned mperr, dperr; longint unsigned mnev, dnev;
  int checks = 0, failures = 0;

  // per-point accounting
  logic [15:0] msm_exp[$];
  int m_in, m_out, m_lost, d_in, d_out, d_lost;
  int d_in_cnt [W], d_out_cnt [W];
  // mechanism counters
  int n_simul = 0, n_msm_overflow = 0, n_dsm_loss = 0, n_msm_aer_full = 0;
  int n_dsm_aer_full = 0, n_dsm_partial_full = 0, n_msm_enc_stall = 0;

  spikes_monitors_top dut (
    .clk, .rst_n, .spikes,
    .msm_aer_req_n(msm_req_n), .msm_aer_ack_n(msm_ack_n), .msm_aer_data(msm_data),
    .msm_aer_oe(msm_oe), .msm_lost,
    .dsm_aer_req_n(dsm_req_n), .dsm_aer_ack_n(dsm_ack_n), .dsm_aer_data(dsm_data),
    .dsm_aer_oe(dsm_oe), .dsm_lost);

  aer_receiver #(.DELAY_MAX(0)) rx_m (.clk, .rst_n, .req_n(msm_req_n), .data(msm_data),
    .oe(msm_oe), .ack_n(msm_ack_n), .got(mg), .got_data(mgd), .protocol_errors(mperr), .n_events(mnev));
  aer_receiver #(.DELAY_MAX(0)) rx_d (.clk, .rst_n, .req_n(dsm_req_n), .data(dsm_data),
    .oe(dsm_oe), .ack_n(dsm_ack_n), .got(dg), .got_data(dgd), .protocol_errors(dperr), .n_events(dnev));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if ($countones(spikes) > 1) n_simul++;
    if (spikes != 0) begin
      m_in += $countones(spikes);
      d_in += $countones(spikes);
      for (int i = 0; i < W; i++) if (spikes[i]) d_in_cnt[i]++;
      if (msm_lost != 0) begin
        check(int'(msm_lost) == $countones(spikes), "MSM drops whole snapshots");
        m_lost += int'(msm_lost);
        n_msm_overflow++;
      end else begin
        for (int b = 0; b < W; b++) if (spikes[b]) msm_exp.push_back(16'(b));
      end
    end
    if (dsm_lost != 0) begin
      d_lost += int'(dsm_lost);
      n_dsm_loss++;
    end
    if (mg) begin
      m_out++;
      check(msm_exp.size() > 0, "MSM event expected");
      if (msm_exp.size() > 0) check(mgd == msm_exp.pop_front(), "MSM event address and order");
    end
    if (dg) begin
      d_out++;
      if (dgd < W) d_out_cnt[dgd]++;
      else check(0, "DSM address in range");
    end
    if (dut.u_msm.aer_full) n_msm_aer_full++;
    if (dut.u_msm.aer_full && dut.u_msm.u_s2a.bit_set) n_msm_enc_stall++;
    if (dut.u_dsm.aer_full) n_dsm_aer_full++;
    if (dut.u_dsm.g_mod[0].u_mod.full || dut.u_dsm.g_mod[1].u_mod.full ||
        dut.u_dsm.g_mod[2].u_mod.full || dut.u_dsm.g_mod[3].u_mod.full) n_dsm_partial_full++;
  end

  task automatic run_point(int rate_msps, int k);
    // probability of a spiking cycle, in 1/1e6 units
    automatic int unsigned p_ppm = (rate_msps * 1_000_000) / (50 * k);
    automatic int cyc_out;
    m_in = 0; m_out = 0; m_lost = 0; d_in = 0; d_out = 0; d_lost = 0;
    foreach (d_in_cnt[i]) begin d_in_cnt[i] = 0; d_out_cnt[i] = 0; end
    for (int c = 0; c < T_STIM; c++) begin
      @(negedge clk);
      if (($urandom % 1_000_000) < p_ppm) begin
        automatic logic [W-1:0] v = '0;
        automatic int placed = 0;
        while (placed < k) begin
          automatic int j = $urandom % W;
          if (!v[j]) begin v[j] = 1'b1; placed++; end
        end
        spikes = v;
      end else spikes = '0;
    end
    @(negedge clk); spikes = '0;
    cyc_out = m_out;
    $display("point %0d Msp/s K=%0d: MSM out %0.2f Mev/s during stimulus", rate_msps, k,
             real'(cyc_out) * 50.0 / real'(T_STIM));
    cyc_out = d_out;
    $display("                     DSM out %0.2f Mev/s during stimulus",
             real'(cyc_out) * 50.0 / real'(T_STIM));
    // drain until both monitors have been idle for 64 cycles
    begin
      automatic int quiet = 0, waited = 0;
      while (quiet < 64 && waited < 60000) begin
        @(negedge clk);
        waited++;
        if (msm_req_n && dsm_req_n && !msm_oe && !dsm_oe) quiet++; else quiet = 0;
      end
    end
    check(msm_exp.size() == 0, "MSM drained");
    check(m_in == m_out + m_lost, "MSM spikes in = events + lost");
    check(d_in == d_out + d_lost, "DSM spikes in = events + lost");
    for (int i = 0; i < W; i++) check(d_out_cnt[i] <= d_in_cnt[i], "DSM no invented events");
    check(msm_req_n && dsm_req_n, "both ports idle after draining");
    $display("  spikes %0d  MSM loss %0.3f  DSM loss %0.3f", m_in,
             real'(m_lost) / real'(m_in > 0 ? m_in : 1), real'(d_lost) / real'(d_in > 0 ? d_in : 1));
    if (rate_msps <= 2) begin
      check(m_lost == 0, "MSM lossless at the lowest rate");
      // a line can fire again before its module's scanner reaches it
      check(d_lost * 100 < 3 * d_in, "DSM loses under 3% at the lowest rate");
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int ki = 0; ki < 2; ki++) begin
      automatic int k = (ki == 0) ? 8 : 16;
      run_point(2, k);
      run_point(5, k);
      run_point(10, k);
      run_point(20, k);
    end
    // Scan-bound point: 2 spikes per spiking cycle at 4 Mspikes/s. The MSM
    // scanner needs W + 3 = 35 cycles per snapshot (at most 2/35 spikes per
    // cycle), below the output port's 1/12, so here the MSM must lose more
    // than the DSM.
    run_point(4, 2);
    check(m_lost > 2 * d_lost && m_lost > 0, "MSM scan-bound: DSM loses less than MSM");
    check(mperr == 0 && dperr == 0, "AER protocol respected on both ports");
    $display("mechanisms: simultaneous=%0d msm_overflow=%0d dsm_merge_loss=%0d msm_aer_full=%0d msm_encoder_stall=%0d dsm_aer_full=%0d dsm_partial_full=%0d",
             n_simul, n_msm_overflow, n_dsm_loss, n_msm_aer_full, n_msm_enc_stall, n_dsm_aer_full, n_dsm_partial_full);
    check(n_simul > 0, "simultaneous spikes happened");
    check(n_msm_overflow > 0, "MSM Spikes FIFO overflow happened");
    check(n_dsm_loss > 0, "DSM merge loss happened");
    check(n_msm_aer_full > 0, "MSM AER FIFO filled");
    check(n_msm_enc_stall > 0, "MSM encoder stalled on a full AER FIFO");
    check(n_dsm_aer_full > 0, "DSM AER FIFO filled");
    check(n_dsm_partial_full > 0, "a DSM partial FIFO filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
