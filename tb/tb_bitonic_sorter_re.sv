// End-to-end test of the resource-efficient bitonic sorter at N = 64, p = 4.
//
// Feeds several sequences (random keys, many equal keys, sorted, reverse sorted) through
// the in_ready/in_valid handshake, with input pauses inside a load. Each output sequence
// is checked key by key against the sequence sorted by the testbench, and its first output
// cycle against the pass timing worked out here: after the last input cycle, S passes of
// N/p + 2 cycles each, with the result leaving 2 cycles into the last pass. Counted: passes
// per sequence (must be S = log N (log N + 1)/2), the distinct permutations the network
// was programmed with (2 log N - 1 in this layout, counting the identity used by the
// load), input pauses, and that the output runs p keys every cycle for N/p cycles.
module tb_bitonic_sorter_re;
  localparam int NB = 6, LB = 2, W = 10;
  localparam int N = 1 << NB, P = 1 << LB, C = N / P, S = NB * (NB + 1) / 2;
  localparam int FRAMES = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_ready, in_valid, out_valid, out_sob;
  logic [W-1:0] in_key [P];
  logic [W-1:0] out_key [P];

  bitonic_sorter_re #(.N_BITS(NB), .LANE_BITS(LB), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_ready(in_ready), .in_valid(in_valid), .in_key(in_key),
    .out_valid(out_valid), .out_sob(out_sob), .out_key(out_key)
  );

  int checks = 0, failures = 0;
  int unsigned frames_in [FRAMES][N];
  int unsigned sorted_ref [FRAMES][N];
  longint cycle = 0;
  longint last_in [FRAMES];
  int n_pause = 0, n_pass = 0;
  bit seen_perm [16][16];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void make_frame(int f);
    int unsigned q[$];
    for (int i = 0; i < N; i++) begin
      case (f % 4)
        0: frames_in[f][i] = $urandom_range((1 << W) - 1);
        1: frames_in[f][i] = $urandom_range(3);
        2: frames_in[f][i] = i;
        default: frames_in[f][i] = (1 << W) - 1 - i;
      endcase
      q.push_back(frames_in[f][i]);
    end
    q.sort();
    for (int i = 0; i < N; i++) sorted_ref[f][i] = q[i];
  endfunction

  initial begin
    in_valid = 0;
    foreach (in_key[l]) in_key[l] = '0;
    for (int f = 0; f < FRAMES; f++) make_frame(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int c;
      c = 0;
      while (c < C) begin
        if (in_ready && (f % 2 == 1) && (c == 3 || c == 9)) begin
          // pause the input for a cycle inside the load
          in_valid = 0;
          n_pause++;
          @(negedge clk);
        end
        in_valid = 1;
        for (int l = 0; l < P; l++) in_key[l] = W'(frames_in[f][c * P + l]);
        @(posedge clk);
        if (in_ready) begin
          if (c == C - 1) last_in[f] = cycle;
          c++;
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  always @(posedge clk)
    if (rst_n && dut.rd_en) begin
      seen_perm[dut.rd_jf][dut.rd_jt] = 1;
      if (dut.rd_k == '0) n_pass++;
    end

  int out_frame = 0, out_idx = 0;
  longint first_cycle;
  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (out_valid && out_frame < FRAMES) begin
        if (out_idx == 0) begin
          longint exp_first;
          first_cycle = cycle;
          exp_first = last_in[out_frame] + 2 + longint'(S - 1) * (C + 2) + 1;
          checks++;
          if (!out_sob) begin failures++; $display("FAIL out_sob"); end
          checks++;
          if (cycle != exp_first) begin
            failures++;
            $display("FAIL frame %0d first output at %0d expected %0d", out_frame, cycle, exp_first);
          end
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
          checks++;
          if (cycle - first_cycle != C - 1) begin failures++; $display("FAIL output not contiguous"); end
          out_idx = 0;
          out_frame++;
        end
      end
    end
  end

  initial begin
    int n_perm;
    wait (out_frame == FRAMES);
    repeat (3) @(posedge clk);
    n_perm = 0;
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) n_perm += seen_perm[a][b];
    checks++;
    if (n_pass != FRAMES * S) begin failures++; $display("FAIL %0d passes, expected %0d", n_pass, FRAMES * S); end
    checks++;
    if (n_perm != 2 * NB - 1) begin failures++; $display("FAIL %0d distinct permutations", n_perm); end
    checks++;
    if (n_pause == 0) begin failures++; $display("FAIL no input pause"); end
    $display("mechanisms: passes=%0d distinct_permutations=%0d input_pauses=%0d", n_pass, n_perm, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (C + 4 + S * (C + 2)) + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d sequences seen", out_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
