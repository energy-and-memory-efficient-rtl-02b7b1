// End-to-end test of the streaming bitonic sorter at a reduced size.
//
// Streams FRAMES sequences of N keys through the sorter: first a run of sequences back to
// back, then an idle slot, then more sequences back to back. Key sets include random keys,
// many equal keys, already sorted and reverse sorted data. Each output sequence is checked
// key by key against the input sequence sorted by the testbench. It also checks that every
// output sequence starts exactly LAT cycles after its input slot, where LAT is worked out
// here from the stage structure, that LAT stays within 6N/p plus a small per-stage
// overhead, and that the output rate is p keys every cycle for back-to-back sequences.
// Mechanisms counted: back-to-back sequences, an idle slot, ascending and descending
// comparisons, a network that only rewires lanes, a network that uses memory, and a full
// cycle of the in-place address sequences of the largest network.
module tb_bitonic_sorter_ht;
  localparam int NB = 6;            // log2 N
  localparam int LB = 2;            // log2 p
  localparam int W  = 10;
  localparam int N  = 1 << NB;
  localparam int P  = 1 << LB;
  localparam int C  = N / P;        // cycles per sequence
  localparam int FRAMES = 24;
  localparam int GAP_AFTER = 12;    // an idle slot follows this many sequences

  logic clk = 0, rst_n = 0;
  logic in_sob, in_valid, out_valid, out_sob;
  logic [W-1:0] in_key [P];
  logic [W-1:0] out_key [P];

  always #5 clk = ~clk;

  bitonic_sorter_ht #(.N_BITS(NB), .LANE_BITS(LB), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_sob(in_sob), .in_valid(in_valid), .in_key(in_key),
    .out_valid(out_valid), .out_sob(out_sob), .out_key(out_key)
  );

  int checks = 0, failures = 0;
  int unsigned frames_in [FRAMES][N];
  int unsigned sorted_ref [FRAMES][N];
  longint in_start [FRAMES];
  longint cycle = 0;
  int n_back_to_back = 0, n_gap = 0, n_spatial = 0, n_mem = 0;
  int n_asc = 0, n_desc = 0, n_agu_cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Latency worked out independently: each of the n(n+1)/2 comparison stages costs 1
  // cycle; the network between the stages comparing bits j and j' costs 1 cycle if both
  // bits are lane bits, else one block of 2^(max(j,j')+1)/p cycles plus 2.
  function automatic int expected_latency();
    int jl[$];
    int lat;
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) jl.push_back(j);
    lat = jl.size();
    for (int s = 0; s + 1 < jl.size(); s++) begin
      int m;
      m = (jl[s] > jl[s+1]) ? jl[s] : jl[s+1];
      lat += (m < LB) ? 1 : ((1 << (m + 1)) / P + 2);
    end
    return lat;
  endfunction

  function automatic void make_frame(int f);
    int unsigned q[$];
    for (int i = 0; i < N; i++) begin
      case (f % 4)
        0: frames_in[f][i] = $urandom_range((1 << W) - 1);
        1: frames_in[f][i] = $urandom_range(3);                // many equal keys
        2: frames_in[f][i] = i;                                // already sorted
        default: frames_in[f][i] = (1 << W) - 1 - i;           // reverse sorted
      endcase
      q.push_back(frames_in[f][i]);
    end
    q.sort();
    for (int i = 0; i < N; i++) sorted_ref[f][i] = q[i];
  endfunction

  // Stimulus.
  initial begin
    in_valid = 0;
    foreach (in_key[l]) in_key[l] = '0;
    for (int f = 0; f < FRAMES; f++) make_frame(f);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f == GAP_AFTER) begin
        // one idle slot
        do @(negedge clk); while (!in_sob);
        n_gap++;
        @(negedge clk);
      end
      do begin
        if (!in_sob) begin in_valid = 0; @(negedge clk); end
      end while (!in_sob);
      in_start[f] = cycle;
      for (int c = 0; c < C; c++) begin
        in_valid = 1;
        for (int l = 0; l < P; l++) in_key[l] = W'(frames_in[f][c * P + l]);
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // Output checking.
  int out_frame = 0, out_idx = 0;
  longint last_out_end = -1;
  initial begin
    int lat;
    lat = expected_latency();
    checks++;
    if (lat > 6 * N / P + 4 * NB * (NB + 1) / 2) begin
      failures++;
      $display("FAIL latency %0d above 6N/p plus stage overhead", lat);
    end
    forever begin
      @(posedge clk);
      #1;
      if (out_valid && out_frame < FRAMES) begin
        if (out_idx == 0) begin
          checks++;
          if (!out_sob) begin failures++; $display("FAIL out_sob missing frame %0d", out_frame); end
          checks++;
          if (cycle - in_start[out_frame] != lat) begin
            failures++;
            $display("FAIL frame %0d latency %0d expected %0d", out_frame,
                     cycle - in_start[out_frame], lat);
          end
          if (last_out_end == cycle - 1) n_back_to_back++;
        end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (out_key[l] != W'(sorted_ref[out_frame][out_idx + l])) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d key %0d got %0d expected %0d", out_frame, out_idx + l,
                       out_key[l], sorted_ref[out_frame][out_idx + l]);
          end
        end
        out_idx += P;
        if (out_idx == N) begin
          out_idx = 0;
          out_frame++;
          last_out_end = cycle;
        end
      end
    end
  end

  // Network entering the last merge phase: it spans the whole sequence, the largest one.
  localparam int SBIG = (NB - 1) * NB / 2 - 1;

  initial begin
    automatic int jl[$];
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) jl.push_back(j);
    for (int s = 0; s + 1 < jl.size(); s++) begin
      int m;
      m = (jl[s] > jl[s+1]) ? jl[s] : jl[s+1];
      if (m < LB) n_spatial++; else n_mem++;
    end
  end

  // Ascending and descending comparisons: stage 0 (phase 1) sorts pair k descending when
  // bit 1 of its lane index is set.
  always @(posedge clk)
    if (rst_n && dut.cas_in_valid[0]) begin
      for (int k = 0; k < P / 2; k++)
        if (dut.g_stage[0].u_cas.desc[k]) n_desc++; else n_asc++;
    end

  // The in-place addresses of the largest network run through all their sequences
  // and come back to the first one (identity table, zero offset): count such returns after valid data went through.
  logic agu_was_moved = 0;
  always @(posedge clk)
    if (rst_n && out_frame > 0) begin
      logic ident;
      ident = 1;
      for (int x = 0; x < NB - LB; x++)
        if (int'(dut.g_stage[SBIG].g_spn.u_spn.g_mem.u_agu.tab[x]) != x) ident = 0;
      if (dut.g_stage[SBIG].g_spn.u_spn.g_mem.u_agu.w != '0) ident = 0;
      if (!ident) agu_was_moved = 1;
      else if (agu_was_moved) begin n_agu_cycle++; agu_was_moved = 0; end
    end

  initial begin
    wait (out_frame == FRAMES);
    repeat (5) @(posedge clk);
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back output"); end
    checks++; if (n_gap == 0)          begin failures++; $display("FAIL no idle slot"); end
    checks++; if (n_spatial == 0)      begin failures++; $display("FAIL no spatial network"); end
    checks++; if (n_mem == 0)          begin failures++; $display("FAIL no memory network"); end
    checks++; if (n_asc == 0 || n_desc == 0) begin failures++; $display("FAIL directions"); end
    checks++; if (n_agu_cycle == 0)    begin failures++; $display("FAIL no AGU address cycle"); end
    $display("mechanisms: back_to_back=%0d idle_slots=%0d spatial_spn=%0d memory_spn=%0d asc=%0d desc=%0d agu_cycles=%0d",
             n_back_to_back, n_gap, n_spatial, n_mem, n_asc, n_desc, n_agu_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat ((FRAMES + 4) * C + 4 * expected_latency() + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d sequences seen", out_frame, FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
