// Full-size end-to-end test of both sorter architectures in the combined top with its
// default parameters (N = 16384, p = 4, 32-bit keys), three sequences each. The same sequences (random, many equal keys, sorted, reverse sorted) go to
// both sorters: to the high-throughput one in input slots, mostly back to back with one
// idle slot; to the resource-efficient one through its handshake, with input pauses.
// Every output key of both is checked against the sequence sorted by the testbench, and
// the high-throughput latency against the stage latencies worked out here.
// Mechanisms counted (each must occur): back-to-back sequences and an idle slot
// (high-throughput), ascending and descending comparisons, spatial-only and memory
// permutation networks, a full cycle of in-place address sequences, and, in the
// resource-efficient sorter, S passes per sequence, 2 log N - 1 distinct network
// programs and input pauses.
module tb_bitonic_sorters_full;
  localparam int NB = 14, LB = 2, W = 32;
  localparam int N = 1 << NB, P = 1 << LB, C = N / P, S = NB * (NB + 1) / 2;
  localparam int FRAMES = 3;
  localparam int GAP_AFTER = 2;
  localparam int SBIG = (NB - 1) * NB / 2 - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ht_in_sob, ht_in_valid, ht_out_valid, ht_out_sob;
  logic re_in_ready, re_in_valid, re_out_valid, re_out_sob;
  logic [W-1:0] ht_in_key [P], ht_out_key [P], re_in_key [P], re_out_key [P];

  bitonic_sorters dut (
    .clk(clk), .rst_n(rst_n),
    .ht_in_sob(ht_in_sob), .ht_in_valid(ht_in_valid), .ht_in_key(ht_in_key),
    .ht_out_valid(ht_out_valid), .ht_out_sob(ht_out_sob), .ht_out_key(ht_out_key),
    .re_in_ready(re_in_ready), .re_in_valid(re_in_valid), .re_in_key(re_in_key),
    .re_out_valid(re_out_valid), .re_out_sob(re_out_sob), .re_out_key(re_out_key)
  );

  int checks = 0, failures = 0;
  int unsigned frames_in [FRAMES][N];
  int unsigned sorted_ref [FRAMES][N];
  longint cycle = 0;
  longint ht_start [FRAMES];
  int n_b2b = 0, n_gap = 0, n_asc = 0, n_desc = 0, n_spatial = 0, n_mem = 0, n_agu = 0;
  int n_pass = 0, n_pause = 0;
  bit seen_perm [16][16];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void make_frame(int f);
    int unsigned q[$];
    for (int i = 0; i < N; i++) begin
      case (f % 4)
        0: frames_in[f][i] = $urandom;
        1: frames_in[f][i] = $urandom_range(3);
        2: frames_in[f][i] = i;
        default: frames_in[f][i] = 32'hFFFF_FFFF - i;
      endcase
      q.push_back(frames_in[f][i]);
    end
    q.sort();
    for (int i = 0; i < N; i++) sorted_ref[f][i] = q[i];
  endfunction

  function automatic int ht_latency();
    int jl[$];
    int lat;
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) jl.push_back(j);
    lat = jl.size();
    for (int s = 0; s + 1 < jl.size(); s++) begin
      int m;
      m = (jl[s] > jl[s+1]) ? jl[s] : jl[s+1];
      lat += (m < LB) ? 1 : ((1 << (m + 1)) / P + 2);
      if (m < LB) n_spatial++; else n_mem++;
    end
    return lat;
  endfunction

  initial begin
    ht_in_valid = 0; re_in_valid = 0;
    foreach (ht_in_key[l]) begin ht_in_key[l] = '0; re_in_key[l] = '0; end
    for (int f = 0; f < FRAMES; f++) make_frame(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  // high-throughput stimulus
  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      if (f == GAP_AFTER) begin
        do @(negedge clk); while (!ht_in_sob);
        n_gap++;
        @(negedge clk);
      end
      while (!ht_in_sob) begin ht_in_valid = 0; @(negedge clk); end
      ht_start[f] = cycle;
      for (int c = 0; c < C; c++) begin
        ht_in_valid = 1;
        for (int l = 0; l < P; l++) ht_in_key[l] = W'(frames_in[f][c * P + l]);
        @(negedge clk);
      end
      ht_in_valid = 0;
    end
  end

  // resource-efficient stimulus
  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      int c;
      c = 0;
      while (c < C) begin
        if (re_in_ready && f == 1 && c == 5) begin
          re_in_valid = 0; n_pause++; @(negedge clk);
        end
        re_in_valid = 1;
        for (int l = 0; l < P; l++) re_in_key[l] = W'(frames_in[f][c * P + l]);
        @(posedge clk);
        if (re_in_ready) c++;
        @(negedge clk);
      end
      re_in_valid = 0;
    end
  end

  // high-throughput output
  int ht_frame = 0, ht_idx = 0;
  longint ht_last_end = -1;
  initial begin
    int lat;
    lat = ht_latency();
    forever begin
      @(posedge clk);
      #1;
      if (ht_out_valid && ht_frame < FRAMES) begin
        if (ht_idx == 0) begin
          checks++;
          if (!ht_out_sob || cycle - ht_start[ht_frame] != lat) begin
            failures++;
            $display("FAIL ht frame %0d start/latency", ht_frame);
          end
          if (ht_last_end == cycle - 1) n_b2b++;
        end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (ht_out_key[l] != W'(sorted_ref[ht_frame][ht_idx + l])) begin
            failures++;
            if (failures < 10) $display("FAIL ht frame %0d key %0d", ht_frame, ht_idx + l);
          end
        end
        ht_idx += P;
        if (ht_idx == N) begin ht_idx = 0; ht_frame++; ht_last_end = cycle; end
      end
    end
  end

  // resource-efficient output
  int re_frame = 0, re_idx = 0;
  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (re_out_valid && re_frame < FRAMES) begin
        checks++;
        if (re_out_sob != (re_idx == 0)) begin failures++; $display("FAIL re out_sob"); end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (re_out_key[l] != W'(sorted_ref[re_frame][re_idx + l])) begin
            failures++;
            if (failures < 10) $display("FAIL re frame %0d key %0d", re_frame, re_idx + l);
          end
        end
        re_idx += P;
        if (re_idx == N) begin re_idx = 0; re_frame++; end
      end
    end
  end

  // mechanism monitors
  logic agu_moved = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ht.cas_in_valid[0])
      for (int k = 0; k < P / 2; k++)
        if (dut.u_ht.g_stage[0].u_cas.desc[k]) n_desc++; else n_asc++;
    if (ht_frame > 0) begin
      logic ident;
      ident = (dut.u_ht.g_stage[SBIG].g_spn.u_spn.g_mem.u_agu.w == '0);
      for (int x = 0; x < NB - LB; x++)
        if (int'(dut.u_ht.g_stage[SBIG].g_spn.u_spn.g_mem.u_agu.tab[x]) != x) ident = 0;
      if (!ident) agu_moved = 1;
      else if (agu_moved) begin n_agu++; agu_moved = 0; end
    end
    if (dut.u_re.rd_en) begin
      seen_perm[dut.u_re.rd_jf][dut.u_re.rd_jt] = 1;
      if (dut.u_re.rd_k == '0) n_pass++;
    end
  end

  initial begin
    int n_perm;
    wait (ht_frame == FRAMES && re_frame == FRAMES);
    repeat (3) @(posedge clk);
    n_perm = 0;
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) n_perm += seen_perm[a][b];
    checks++; if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back"); end
    checks++; if (n_gap == 0) begin failures++; $display("FAIL no idle slot"); end
    checks++; if (n_asc == 0 || n_desc == 0) begin failures++; $display("FAIL directions"); end
    checks++; if (n_spatial == 0 || n_mem == 0) begin failures++; $display("FAIL network kinds"); end
    checks++; if (n_agu == 0) begin failures++; $display("FAIL no address cycle"); end
    checks++; if (n_pass != FRAMES * S) begin failures++; $display("FAIL passes %0d", n_pass); end
    checks++; if (n_perm != 2 * NB - 1) begin failures++; $display("FAIL programs %0d", n_perm); end
    checks++; if (n_pause == 0) begin failures++; $display("FAIL no pause"); end
    $display("mechanisms: ht back_to_back=%0d idle_slots=%0d asc=%0d desc=%0d spatial_spn=%0d memory_spn=%0d agu_cycles=%0d; re passes=%0d programs=%0d pauses=%0d",
             n_b2b, n_gap, n_asc, n_desc, n_spatial, n_mem, n_agu, n_pass, n_perm, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (C + 4 + S * (C + 2)) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: ht %0d re %0d sequences", ht_frame, re_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
