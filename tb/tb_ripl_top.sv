// tb_ripl_top: end-to-end test of all the benchmark pipelines side by side,
// at a reduced image size (16 x 12, two frames). Every pipeline is fed the
// same synthetic frames (a noisy horizontal ramp with a bright square), with
// random input gaps and random output backpressure after the first frame,
// and every output stream is compared with a reference computed here. The
// testbench also counts how often each mechanism of the design happened
// (duplicator stalls, a whole frame held in a frame FIFO, transpose drain,
// concurrent filter2D and imap, fold results, line-buffer start, saturation)
// and fails any that never did.
module tb_ripl_top;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  bit stall_mode = 0;
  bit src_ready = 0;
  int t_first_in = -1;
  logic bri_in_valid, bri_in_ready;
  logic [8-1:0] bri_in_data;
  longint src_bri_in[$];
  int n_in_bri_in = 0;
  logic sob_in_valid, sob_in_ready;
  logic [8-1:0] sob_in_data;
  longint src_sob_in[$];
  int n_in_sob_in = 0;
  logic eb_in_valid, eb_in_ready;
  logic [8-1:0] eb_in_data;
  longint src_eb_in[$];
  int n_in_eb_in = 0;
  logic thr_in_valid, thr_in_ready;
  logic [8-1:0] thr_in_data;
  longint src_thr_in[$];
  int n_in_thr_in = 0;
  logic hn_in_valid, hn_in_ready;
  logic [8-1:0] hn_in_data;
  longint src_hn_in[$];
  int n_in_hn_in = 0;
  logic tr_in_valid, tr_in_ready;
  logic [8-1:0] tr_in_data;
  longint src_tr_in[$];
  int n_in_tr_in = 0;
  logic shp_in_valid, shp_in_ready;
  logic [8-1:0] shp_in_data;
  longint src_shp_in[$];
  int n_in_shp_in = 0;
  logic avg_a_valid, avg_a_ready;
  logic [8-1:0] avg_a_data;
  longint src_avg_a[$];
  int n_in_avg_a = 0;
  logic avg_b_valid, avg_b_ready;
  logic [8-1:0] avg_b_data;
  longint src_avg_b[$];
  int n_in_avg_b = 0;
  logic uz_in_valid, uz_in_ready;
  logic [8-1:0] uz_in_data;
  longint src_uz_in[$];
  int n_in_uz_in = 0;
  logic bri_out_valid, bri_out_ready;
  logic [8-1:0] bri_out_data;
  longint exp_bri_out[$];
  int n_got_bri_out = 0;
  bit done_bri_out = 0;
  logic sob_out_valid, sob_out_ready;
  logic [11-1:0] sob_out_data;
  longint exp_sob_out[$];
  int n_got_sob_out = 0;
  bit done_sob_out = 0;
  logic eb_out_valid, eb_out_ready;
  logic [12-1:0] eb_out_data;
  longint exp_eb_out[$];
  int n_got_eb_out = 0;
  bit done_eb_out = 0;
  logic thr_out_valid, thr_out_ready;
  logic [8-1:0] thr_out_data;
  longint exp_thr_out[$];
  int n_got_thr_out = 0;
  bit done_thr_out = 0;
  logic hn_out_valid, hn_out_ready;
  logic [8-1:0] hn_out_data;
  longint exp_hn_out[$];
  int n_got_hn_out = 0;
  bit done_hn_out = 0;
  logic tr_out_valid, tr_out_ready;
  logic [8-1:0] tr_out_data;
  longint exp_tr_out[$];
  int n_got_tr_out = 0;
  bit done_tr_out = 0;
  logic shp_out_valid, shp_out_ready;
  logic [12-1:0] shp_out_data;
  longint exp_shp_out[$];
  int n_got_shp_out = 0;
  bit done_shp_out = 0;
  logic avg_out_valid, avg_out_ready;
  logic [8-1:0] avg_out_data;
  longint exp_avg_out[$];
  int n_got_avg_out = 0;
  bit done_avg_out = 0;
  logic uz_even_valid, uz_even_ready;
  logic [8-1:0] uz_even_data;
  longint exp_uz_even[$];
  int n_got_uz_even = 0;
  bit done_uz_even = 0;
  logic uz_odd_valid, uz_odd_ready;
  logic [8-1:0] uz_odd_data;
  longint exp_uz_odd[$];
  int n_got_uz_odd = 0;
  bit done_uz_odd = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int M = 16, N = 12, FRAMES = 2;
  localparam int F = M * N;
  ripl_top #(.M(M), .N(N)) dut (.clk, .rst,
    .bri_in_valid, .bri_in_ready, .bri_in_data,
    .sob_in_valid, .sob_in_ready, .sob_in_data,
    .eb_in_valid, .eb_in_ready, .eb_in_data,
    .thr_in_valid, .thr_in_ready, .thr_in_data,
    .hn_in_valid, .hn_in_ready, .hn_in_data,
    .tr_in_valid, .tr_in_ready, .tr_in_data,
    .shp_in_valid, .shp_in_ready, .shp_in_data,
    .avg_a_valid, .avg_a_ready, .avg_a_data,
    .avg_b_valid, .avg_b_ready, .avg_b_data,
    .uz_in_valid, .uz_in_ready, .uz_in_data,
    .bri_out_valid, .bri_out_ready, .bri_out_data,
    .sob_out_valid, .sob_out_ready, .sob_out_data,
    .eb_out_valid, .eb_out_ready, .eb_out_data,
    .thr_out_valid, .thr_out_ready, .thr_out_data,
    .hn_out_valid, .hn_out_ready, .hn_out_data,
    .tr_out_valid, .tr_out_ready, .tr_out_data,
    .shp_out_valid, .shp_out_ready, .shp_out_data,
    .avg_out_valid, .avg_out_ready, .avg_out_data,
    .uz_even_valid, .uz_even_ready, .uz_even_data,
    .uz_odd_valid, .uz_odd_ready, .uz_odd_data);
  task automatic on_sob_out_token(); endtask
  task automatic on_eb_out_token(); endtask
  task automatic on_hn_out_token(); endtask
  task automatic on_tr_out_token(); endtask
  task automatic on_shp_out_token(); endtask
  task automatic on_avg_out_token(); endtask
  task automatic on_uz_even_token(); endtask
  task automatic on_uz_odd_token(); endtask

  // mechanism counters
  int n_sat = 0, n_dark = 0, n_frame_full = 0, n_dup_stall = 0, n_tr_drain_block = 0;
  int n_overlap = 0, n_fold = 0, n_hist = 0, n_line_start = 0;
  task automatic on_bri_out_token(); if (bri_out_data == 8'd255) n_sat++; endtask
  task automatic on_thr_out_token(); if (thr_out_data == 8'd0) n_dark++; endtask
  always @(posedge clk) if (!rst) begin
    // a whole frame waiting in the duplicated image's FIFO
    if (dut.u_thr.u_wire_frame.count == ($clog2(F)+1)'(F)) n_frame_full++;
    if (dut.u_hn.u_wire_frame.count == ($clog2(F)+1)'(F)) n_frame_full++;
    // duplicator holding back the image because one branch cannot take it
    if (thr_in_valid && !thr_in_ready) n_dup_stall++;
    // transpose refusing input while it drains its frame buffer
    if (tr_in_valid && !tr_in_ready && dut.u_tr.draining) n_tr_drain_block++;
    // filter2D and imap actors both moving tokens in the same cycle
    if (dut.u_eb.u_sobel.u_filter2d.in_valid && dut.u_eb.u_sobel.u_filter2d.in_ready &&
        eb_out_valid && eb_out_ready) n_overlap++;
    // foldScalar result and foldVector bins leaving their actors
    if (dut.u_thr.u_fold.out_valid && dut.u_thr.u_fold.out_ready) n_fold++;
    if (dut.u_hn.u_hist.out_valid && dut.u_hn.u_hist.out_ready) n_hist++;
    // line buffer: first result of a frame leaving once a row and two pixels are in
    if (sob_out_valid && sob_out_ready && dut.u_sob.u_filter2d.out_lin == '0 &&
        dut.u_sob.u_filter2d.n_rx == ($clog2(F+1)+1)'(M + 2)) n_line_start++;
  end
  task automatic mech(int n, string what);
    check(n > 0, {"mechanism never happened: ", what});
    $display("  %-40s %0d", what, n);
  endtask
  task automatic finish_checks();
    check(n_got_bri_out == FRAMES * F && n_got_thr_out == FRAMES * F && n_got_tr_out == FRAMES * F &&
          n_got_hn_out == FRAMES * F && n_got_uz_odd == FRAMES * F / 2, "output counts");
    mech(n_sat, "brighten saturation at 255");
    mech(n_dark, "threshold pixels set to 0");
    mech(n_frame_full, "cycles with a full frame FIFO");
    mech(n_dup_stall, "duplicator stall cycles");
    mech(n_tr_drain_block, "transpose input blocked by drain");
    mech(n_overlap, "filter2D and imap concurrent cycles");
    mech(n_fold, "foldScalar results");
    check(n_hist == FRAMES * 256, "foldVector emitted 256 bins per frame");
    mech(n_hist, "foldVector bins emitted");
    mech(n_line_start, "line-buffer start after a row + 2 pixels");
  endtask

  function automatic int cl(int v, int lim); return v < 0 ? 0 : (v > lim - 1 ? lim - 1 : v); endfunction
  int f[];   // current reference frame, row-major
  function automatic int px(int x, int y); return f[cl(y, N) * M + cl(x, M)]; endfunction
  function automatic int sobel(int x, int y);
    int gx, gy;
    gy = (px(x-1,y-1) + 2*px(x,y-1) + px(x+1,y-1)) - (px(x-1,y+1) + 2*px(x,y+1) + px(x+1,y+1));
    gx = (px(x+1,y-1) + 2*px(x+1,y) + px(x+1,y+1)) - (px(x-1,y-1) + 2*px(x-1,y) + px(x-1,y+1));
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  initial begin
    f = new[F];
    stall_mode = 0;
    for (int fr = 0; fr < FRAMES; fr++) begin
      int mx, h[256], e[];
      e = new[F];
      // a smooth gradient with noise, and a bright square
      mx = 0;
      for (int i = 0; i < F; i++) begin
        f[i] = ((i % M) * 200) / M + $urandom_range(0, 40);
        if ((i / M) > N / 4 && (i / M) < N / 2 && (i % M) > M / 4 && (i % M) < M / 2) f[i] = 250;
        if (f[i] > mx) mx = f[i];
      end
      for (int b = 0; b < 256; b++) h[b] = 0;
      for (int i = 0; i < F; i++) h[f[i]]++;
      for (int b = 1; b < 256; b++) h[b] += h[b - 1];
      for (int i = 0; i < F; i++) begin
        int x, y, s, bv;
        x = i % M; y = i / M;
        src_bri_in.push_back(f[i]); src_sob_in.push_back(f[i]); src_eb_in.push_back(f[i]);
        src_thr_in.push_back(f[i]); src_hn_in.push_back(f[i]); src_tr_in.push_back(f[i]);
        src_shp_in.push_back(f[i]); src_avg_a.push_back(f[i]); src_avg_b.push_back(255 - f[i]);
        src_uz_in.push_back(f[i]);
        exp_bri_out.push_back(f[i] + 50 > 255 ? 255 : f[i] + 50);
        e[i] = sobel(x, y);
        exp_sob_out.push_back(e[i]);
        exp_thr_out.push_back(f[i] > mx - 50 ? 255 : 0);
        exp_hn_out.push_back(h[f[i]] * 255 / F);
        s = 5 * px(x, y) - px(x, y - 1) - px(x - 1, y) - px(x + 1, y) - px(x, y + 1);
        exp_shp_out.push_back(s & 12'hfff);
        exp_avg_out.push_back((f[i] + 255 - f[i]) / 2);
        if (i % 2 == 0) exp_uz_even.push_back(f[i]); else exp_uz_odd.push_back(f[i]);
      end
      for (int i = 0; i < F; i++) begin
        int x, y, s;
        x = i % M; y = i / M; s = 0;
        for (int d = -2; d <= 2; d++) s += e[y * M + cl(x + d, M)];
        exp_eb_out.push_back(s / 3);
      end
      for (int x = 0; x < M; x++) for (int y = 0; y < N; y++) exp_tr_out.push_back(f[y * M + x]);
    end
    src_ready = 1;
  end

  // driver for bri_in
  initial begin
    bri_in_valid = 0; bri_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_bri_in.size() > 0) begin
      bit took;
      if (!bri_in_valid) bri_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      bri_in_data = 8'(src_bri_in[0]);
      #1;
      took = bri_in_valid && bri_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_bri_in.pop_front());
        n_in_bri_in++;
      end
      @(posedge clk); #1;
      if (took) bri_in_valid = 0;
    end
    bri_in_valid = 0;
  end

  // driver for sob_in
  initial begin
    sob_in_valid = 0; sob_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_sob_in.size() > 0) begin
      bit took;
      if (!sob_in_valid) sob_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      sob_in_data = 8'(src_sob_in[0]);
      #1;
      took = sob_in_valid && sob_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_sob_in.pop_front());
        n_in_sob_in++;
      end
      @(posedge clk); #1;
      if (took) sob_in_valid = 0;
    end
    sob_in_valid = 0;
  end

  // driver for eb_in
  initial begin
    eb_in_valid = 0; eb_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_eb_in.size() > 0) begin
      bit took;
      if (!eb_in_valid) eb_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      eb_in_data = 8'(src_eb_in[0]);
      #1;
      took = eb_in_valid && eb_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_eb_in.pop_front());
        n_in_eb_in++;
      end
      @(posedge clk); #1;
      if (took) eb_in_valid = 0;
    end
    eb_in_valid = 0;
  end

  // driver for thr_in
  initial begin
    thr_in_valid = 0; thr_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_thr_in.size() > 0) begin
      bit took;
      if (!thr_in_valid) thr_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      thr_in_data = 8'(src_thr_in[0]);
      #1;
      took = thr_in_valid && thr_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_thr_in.pop_front());
        n_in_thr_in++;
      end
      @(posedge clk); #1;
      if (took) thr_in_valid = 0;
    end
    thr_in_valid = 0;
  end

  // driver for hn_in
  initial begin
    hn_in_valid = 0; hn_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_hn_in.size() > 0) begin
      bit took;
      if (!hn_in_valid) hn_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      hn_in_data = 8'(src_hn_in[0]);
      #1;
      took = hn_in_valid && hn_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_hn_in.pop_front());
        n_in_hn_in++;
      end
      @(posedge clk); #1;
      if (took) hn_in_valid = 0;
    end
    hn_in_valid = 0;
  end

  // driver for tr_in
  initial begin
    tr_in_valid = 0; tr_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_tr_in.size() > 0) begin
      bit took;
      if (!tr_in_valid) tr_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      tr_in_data = 8'(src_tr_in[0]);
      #1;
      took = tr_in_valid && tr_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_tr_in.pop_front());
        n_in_tr_in++;
      end
      @(posedge clk); #1;
      if (took) tr_in_valid = 0;
    end
    tr_in_valid = 0;
  end

  // driver for shp_in
  initial begin
    shp_in_valid = 0; shp_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_shp_in.size() > 0) begin
      bit took;
      if (!shp_in_valid) shp_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      shp_in_data = 8'(src_shp_in[0]);
      #1;
      took = shp_in_valid && shp_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_shp_in.pop_front());
        n_in_shp_in++;
      end
      @(posedge clk); #1;
      if (took) shp_in_valid = 0;
    end
    shp_in_valid = 0;
  end

  // driver for avg_a
  initial begin
    avg_a_valid = 0; avg_a_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_avg_a.size() > 0) begin
      bit took;
      if (!avg_a_valid) avg_a_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      avg_a_data = 8'(src_avg_a[0]);
      #1;
      took = avg_a_valid && avg_a_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_avg_a.pop_front());
        n_in_avg_a++;
      end
      @(posedge clk); #1;
      if (took) avg_a_valid = 0;
    end
    avg_a_valid = 0;
  end

  // driver for avg_b
  initial begin
    avg_b_valid = 0; avg_b_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_avg_b.size() > 0) begin
      bit took;
      if (!avg_b_valid) avg_b_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      avg_b_data = 8'(src_avg_b[0]);
      #1;
      took = avg_b_valid && avg_b_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_avg_b.pop_front());
        n_in_avg_b++;
      end
      @(posedge clk); #1;
      if (took) avg_b_valid = 0;
    end
    avg_b_valid = 0;
  end

  // driver for uz_in
  initial begin
    uz_in_valid = 0; uz_in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_uz_in.size() > 0) begin
      bit took;
      if (!uz_in_valid) uz_in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      uz_in_data = 8'(src_uz_in[0]);
      #1;
      took = uz_in_valid && uz_in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_uz_in.pop_front());
        n_in_uz_in++;
      end
      @(posedge clk); #1;
      if (took) uz_in_valid = 0;
    end
    uz_in_valid = 0;
  end

  // monitor for bri_out
  initial begin
    bri_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_bri_out.size() > 0) begin
      bri_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (bri_out_valid && bri_out_ready) begin
        check(bri_out_data == 8'(exp_bri_out[0]), $sformatf("bri_out %0d: got %0d want %0d", n_got_bri_out, bri_out_data, $unsigned(8'(exp_bri_out[0]))));
        void'(exp_bri_out.pop_front());
        n_got_bri_out++;
        on_bri_out_token();
      end
      @(posedge clk); #1;
    end
    bri_out_ready = 0;
    done_bri_out = 1;
  end

  // monitor for sob_out
  initial begin
    sob_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_sob_out.size() > 0) begin
      sob_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (sob_out_valid && sob_out_ready) begin
        check(sob_out_data == 11'(exp_sob_out[0]), $sformatf("sob_out %0d: got %0d want %0d", n_got_sob_out, sob_out_data, $unsigned(11'(exp_sob_out[0]))));
        void'(exp_sob_out.pop_front());
        n_got_sob_out++;
        on_sob_out_token();
      end
      @(posedge clk); #1;
    end
    sob_out_ready = 0;
    done_sob_out = 1;
  end

  // monitor for eb_out
  initial begin
    eb_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_eb_out.size() > 0) begin
      eb_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (eb_out_valid && eb_out_ready) begin
        check(eb_out_data == 12'(exp_eb_out[0]), $sformatf("eb_out %0d: got %0d want %0d", n_got_eb_out, eb_out_data, $unsigned(12'(exp_eb_out[0]))));
        void'(exp_eb_out.pop_front());
        n_got_eb_out++;
        on_eb_out_token();
      end
      @(posedge clk); #1;
    end
    eb_out_ready = 0;
    done_eb_out = 1;
  end

  // monitor for thr_out
  initial begin
    thr_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_thr_out.size() > 0) begin
      thr_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (thr_out_valid && thr_out_ready) begin
        check(thr_out_data == 8'(exp_thr_out[0]), $sformatf("thr_out %0d: got %0d want %0d", n_got_thr_out, thr_out_data, $unsigned(8'(exp_thr_out[0]))));
        void'(exp_thr_out.pop_front());
        n_got_thr_out++;
        on_thr_out_token();
      end
      @(posedge clk); #1;
    end
    thr_out_ready = 0;
    done_thr_out = 1;
  end

  // monitor for hn_out
  initial begin
    hn_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_hn_out.size() > 0) begin
      hn_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (hn_out_valid && hn_out_ready) begin
        check(hn_out_data == 8'(exp_hn_out[0]), $sformatf("hn_out %0d: got %0d want %0d", n_got_hn_out, hn_out_data, $unsigned(8'(exp_hn_out[0]))));
        void'(exp_hn_out.pop_front());
        n_got_hn_out++;
        on_hn_out_token();
      end
      @(posedge clk); #1;
    end
    hn_out_ready = 0;
    done_hn_out = 1;
  end

  // monitor for tr_out
  initial begin
    tr_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_tr_out.size() > 0) begin
      tr_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (tr_out_valid && tr_out_ready) begin
        check(tr_out_data == 8'(exp_tr_out[0]), $sformatf("tr_out %0d: got %0d want %0d", n_got_tr_out, tr_out_data, $unsigned(8'(exp_tr_out[0]))));
        void'(exp_tr_out.pop_front());
        n_got_tr_out++;
        on_tr_out_token();
      end
      @(posedge clk); #1;
    end
    tr_out_ready = 0;
    done_tr_out = 1;
  end

  // monitor for shp_out
  initial begin
    shp_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_shp_out.size() > 0) begin
      shp_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (shp_out_valid && shp_out_ready) begin
        check(shp_out_data == 12'(exp_shp_out[0]), $sformatf("shp_out %0d: got %0d want %0d", n_got_shp_out, shp_out_data, $unsigned(12'(exp_shp_out[0]))));
        void'(exp_shp_out.pop_front());
        n_got_shp_out++;
        on_shp_out_token();
      end
      @(posedge clk); #1;
    end
    shp_out_ready = 0;
    done_shp_out = 1;
  end

  // monitor for avg_out
  initial begin
    avg_out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_avg_out.size() > 0) begin
      avg_out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (avg_out_valid && avg_out_ready) begin
        check(avg_out_data == 8'(exp_avg_out[0]), $sformatf("avg_out %0d: got %0d want %0d", n_got_avg_out, avg_out_data, $unsigned(8'(exp_avg_out[0]))));
        void'(exp_avg_out.pop_front());
        n_got_avg_out++;
        on_avg_out_token();
      end
      @(posedge clk); #1;
    end
    avg_out_ready = 0;
    done_avg_out = 1;
  end

  // monitor for uz_even
  initial begin
    uz_even_ready = 0;
    @(negedge rst);
    #1;
    while (exp_uz_even.size() > 0) begin
      uz_even_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (uz_even_valid && uz_even_ready) begin
        check(uz_even_data == 8'(exp_uz_even[0]), $sformatf("uz_even %0d: got %0d want %0d", n_got_uz_even, uz_even_data, $unsigned(8'(exp_uz_even[0]))));
        void'(exp_uz_even.pop_front());
        n_got_uz_even++;
        on_uz_even_token();
      end
      @(posedge clk); #1;
    end
    uz_even_ready = 0;
    done_uz_even = 1;
  end

  // monitor for uz_odd
  initial begin
    uz_odd_ready = 0;
    @(negedge rst);
    #1;
    while (exp_uz_odd.size() > 0) begin
      uz_odd_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (uz_odd_valid && uz_odd_ready) begin
        check(uz_odd_data == 8'(exp_uz_odd[0]), $sformatf("uz_odd %0d: got %0d want %0d", n_got_uz_odd, uz_odd_data, $unsigned(8'(exp_uz_odd[0]))));
        void'(exp_uz_odd.pop_front());
        n_got_uz_odd++;
        on_uz_odd_token();
      end
      @(posedge clk); #1;
    end
    uz_odd_ready = 0;
    done_uz_odd = 1;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (done_bri_out && done_sob_out && done_eb_out && done_thr_out && done_hn_out && done_tr_out && done_shp_out && done_avg_out && done_uz_even && done_uz_odd);
    finish_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
