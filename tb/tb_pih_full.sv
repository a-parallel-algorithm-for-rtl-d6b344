// tb_pih_full: the end-to-end test of tb_pih_top at full size: the engine
// with all its default parameters (19-bit templates, 2047-entry sLUTs) on a
// 512 x 512 test image, the size of the usual test photographs. Otherwise
// identical, except that a table miss is only required when some sLUT ran
// out of room (at this size every trained template fits).
//
// The test in full: an inverse halftoning engine test on a synthetic image.
//
// The testbench makes its own workload: a W x H grey test image (a ramp with
// an inverted disc), halftoned by Floyd-Steinberg error diffusion. The
// look-up table is trained on that pair the way the table method does it:
// for every pixel a 19-bit template is read from a 19-pixel window of the
// halftone (rows -2..+2 holding 3, 5, 5, 5 and 1 pixels; the window shape is
// the testbench's own), and each distinct template gets the mean grey value
// of the pixels where it occurs. m is the integer mean of all distinct
// templates. Each template goes into the sLUT its slut number names, as long
// as that sLUT has room (2^D - 1 entries); the rest are left out and read
// the fallback grey value in word 0.
//
// The tables are loaded through the load port, then the halftone is streamed
// four pixels per clock in raster order, with a few idle clocks mixed in.
// A reference model predicts every output group (slut numbers, priority,
// CAM hit or fallback, compensation from the right-hand neighbour) and its
// arrival four clocks after the templates. The mechanisms exercised are
// counted and each must occur: dropped templates, runs of dropped
// neighbours, templates missing from the tables, templates below m,
// groups with no conflict and idle clocks. The share of dropped pixels and
// the PSNR against the original grey image are printed.
module tb_pih_full;
  import pih_pkg::*;

  localparam int W  = 512;
  localparam int H  = 512;
  localparam int TD = 11;           // the engine's default sLUT address width
  localparam int P  = 19;
  localparam grey_t FALLBACK = 8'd128;
  localparam int MAX_CYCLES = 400000;

  int checks = 0, failures = 0;
  int n_drop = 0, n_run = 0, n_miss = 0, n_below_m = 0, n_clean = 0, n_idle = 0;
  int n_overflow = 0, n_stored = 0, n_groups_out = 0;

  logic        clk = 0, rst_n = 0;
  logic [P-1:0] m;
  logic        in_valid;
  logic [P-1:0] in_t [NUM_LANES];
  logic        ld_en;
  slut_t       ld_slut;
  logic [TD-1:0] ld_addr;
  logic [P-1:0] ld_t;
  grey_t       ld_grey;
  logic        out_valid;
  grey_t       grey [NUM_LANES];
  logic [NUM_LANES-1:0] dropped;
  logic [NUM_SLUTS-1:0] slut_hit;

  pih_top u_dut (
    .clk, .rst_n, .m, .in_valid, .in_t, .ld_en, .ld_slut, .ld_addr, .ld_t, .ld_grey,
    .out_valid, .grey, .dropped, .slut_hit
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- workload ----------------
  int   contone  [H][W];
  bit   halftone [H][W];
  logic [P-1:0] tmpl [H][W];

  int   lut_sum [logic [P-1:0]];
  int   lut_cnt [logic [P-1:0]];
  grey_t lut_val [logic [P-1:0]];
  int    where_slut [logic [P-1:0]];   // sLUT holding a stored template
  int    fill [NUM_SLUTS];

  typedef struct { logic [P-1:0] t; slut_t s; int a; grey_t g; } load_t;
  load_t loads [$];

  function automatic slut_t ref_slut(input logic [P-1:0] tt, input logic [P-1:0] mm);
    int cnt = $countones(tt ^ mm);
    if (tt < mm) cnt = (8 - (cnt % 8)) % 8;
    return slut_t'(cnt);
  endfunction

  function automatic bit pix(input int y, input int x);
    if (y < 0 || y >= H || x < 0 || x >= W) return 1'b0;
    return halftone[y][x];
  endfunction

  int   err [H][W];                 // error diffusion work area

  task automatic make_workload();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v = (x * 200) / (W - 1) + (y * 55) / (H - 1);
        int dx = x - W / 2, dy = y - H / 2;
        if (dx * dx + dy * dy < (H / 3) * (H / 3)) v = 255 - v;
        contone[y][x] = v;
        err[y][x] = v * 16;
      end
    // Floyd-Steinberg error diffusion, values in 1/16 steps
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int old = err[y][x];
        int nw  = (old >= 128 * 16) ? 255 * 16 : 0;
        int e   = old - nw;
        halftone[y][x] = (nw != 0);
        if (x + 1 < W)              err[y][x+1]   += (e * 7) / 16;
        if (y + 1 < H && x > 0)     err[y+1][x-1] += (e * 3) / 16;
        if (y + 1 < H)              err[y+1][x]   += (e * 5) / 16;
        if (y + 1 < H && x + 1 < W) err[y+1][x+1] += (e * 1) / 16;
      end
    // 19-pixel templates
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [P-1:0] t = '0;
        int b = 0;
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++) begin
            bit inwin = (dy == -2) ? (dx >= -1 && dx <= 1) : (dy == 2) ? (dx == 0) : 1'b1;
            if (inwin) begin t[b] = pix(y + dy, x + dx); b++; end
          end
        tmpl[y][x] = t;
      end
  endtask

  task automatic build_tables();
    longint sum_t = 0;
    int n = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [P-1:0] t = tmpl[y][x];
        if (!lut_cnt.exists(t)) begin lut_cnt[t] = 0; lut_sum[t] = 0; end
        lut_cnt[t] += 1;
        lut_sum[t] += contone[y][x];
      end
    foreach (lut_cnt[t]) begin
      lut_val[t] = grey_t'(lut_sum[t] / lut_cnt[t]);
      sum_t += longint'(t);
      n++;
    end
    m = P'(sum_t / n);
    for (int k = 0; k < NUM_SLUTS; k++) fill[k] = 0;
    foreach (lut_cnt[t]) begin
      slut_t s = ref_slut(t, m);
      if (fill[s] < (2 ** TD) - 1) begin
        load_t l;
        fill[s]++;
        l.t = t; l.s = s; l.a = fill[s]; l.g = lut_val[t];
        loads.push_back(l);
        where_slut[t] = int'(s);
        n_stored++;
      end else n_overflow++;
    end
    $display("distinct templates %0d, stored %0d, left out %0d, m = %0d", n, n_stored, n_overflow, m);
    for (int k = 0; k < NUM_SLUTS; k++)
      $display("  sLUT %0d holds %0d of %0d entries", k, fill[k], (2 ** TD) - 1);
  endtask

  // ---------------- reference model ----------------
  typedef struct { grey_t g [NUM_LANES]; logic [NUM_LANES-1:0] d; int due; } exp_t;
  exp_t expq [$];

  function automatic exp_t predict(input logic [P-1:0] t [NUM_LANES], input int due);
    exp_t r;
    slut_t s [NUM_LANES];
    logic  kept [NUM_LANES];
    grey_t own [NUM_LANES];
    int    owner [NUM_SLUTS];
    for (int k = 0; k < NUM_SLUTS; k++) owner[k] = -1;
    for (int i = 0; i < NUM_LANES; i++) begin
      s[i] = ref_slut(t[i], m);
      owner[s[i]] = i;
      if (t[i] < m) n_below_m++;
    end
    for (int i = 0; i < NUM_LANES; i++) begin
      kept[i] = (owner[s[i]] == i);
      if (kept[i]) begin
        if (where_slut.exists(t[i])) own[i] = lut_val[t[i]];
        else begin own[i] = FALLBACK; n_miss++; end
      end else own[i] = 8'd0;
    end
    r.g[NUM_LANES-1] = own[NUM_LANES-1];
    for (int i = NUM_LANES - 2; i >= 0; i--) r.g[i] = kept[i] ? own[i] : r.g[i+1];
    for (int i = 0; i < NUM_LANES; i++) begin
      r.d[i] = !kept[i];
      if (!kept[i]) n_drop++;
    end
    if (!kept[0] && !kept[1]) n_run++;
    if (r.d == '0) n_clean++;
    r.due = due;
    return r;
  endfunction

  // ---------------- output check ----------------
  longint sq_err = 0;
  int     out_px = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at clock %0d", cyc);
      end else begin
        automatic exp_t e = expq.pop_front();
        automatic int y = (n_groups_out * NUM_LANES) / W;
        automatic int x = (n_groups_out * NUM_LANES) % W;
        checks++;
        if (cyc != e.due) begin
          failures++;
          $display("FAIL group %0d arrived at clock %0d, expected %0d", n_groups_out, cyc, e.due);
        end
        for (int i = 0; i < NUM_LANES; i++) begin
          checks++;
          if (grey[i] != e.g[i] || dropped[i] != e.d[i]) begin
            failures++;
            if (failures < 20)
              $display("FAIL group %0d lane %0d grey %0d exp %0d dropped %b exp %b",
                       n_groups_out, i, grey[i], e.g[i], dropped[i], e.d[i]);
          end
          sq_err += longint'((int'(grey[i]) - contone[y][x + i]) ** 2);
          out_px++;
        end
        n_groups_out++;
      end
    end
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; ld_en = 0; ld_slut = '0; ld_addr = '0; ld_t = '0; ld_grey = '0; m = '0;
    for (int i = 0; i < NUM_LANES; i++) in_t[i] = '0;
    make_workload();
    build_tables();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // fallback word of every sLUT, then the templates
    for (int k = 0; k < NUM_SLUTS; k++) begin
      @(negedge clk);
      ld_en = 1; ld_slut = slut_t'(k); ld_addr = '0; ld_t = '0; ld_grey = FALLBACK;
    end
    foreach (loads[j]) begin
      @(negedge clk);
      ld_en = 1; ld_slut = loads[j].s; ld_addr = TD'(loads[j].a); ld_t = loads[j].t; ld_grey = loads[j].g;
    end
    @(negedge clk) ld_en = 0;
    // stream the image, four pixels per clock
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += NUM_LANES) begin
        logic [P-1:0] grp [NUM_LANES];
        @(negedge clk);
        if ($urandom_range(0, 15) == 0) begin
          in_valid = 0;
          n_idle++;
          @(negedge clk);
        end
        for (int i = 0; i < NUM_LANES; i++) begin grp[i] = tmpl[y][x + i]; in_t[i] = grp[i]; end
        in_valid = 1;
        // the templates are taken at the next edge (cyc + 1); four register
        // stages, so the result is there after the fourth edge counting that one
        expq.push_back(predict(grp, cyc + 1 + 3));
      end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_groups_out != H * W / NUM_LANES) begin
      failures++;
      $display("FAIL %0d groups out, %0d still expected", n_groups_out, expq.size());
    end
    $display("mechanisms: dropped %0d, dropped runs %0d, table misses %0d, below m %0d, clean groups %0d, idle %0d, left out of tables %0d",
             n_drop, n_run, n_miss, n_below_m, n_clean, n_idle, n_overflow);
    if (n_drop == 0)     begin failures++; $display("FAIL no template dropped"); end
    if (n_run == 0)      begin failures++; $display("FAIL no run of dropped templates"); end
    // at full size every trained template fits, so misses occur only when
    // some sLUT overflowed
    if (n_miss == 0 && n_overflow > 0) begin failures++; $display("FAIL no table miss"); end
    if (n_below_m == 0)  begin failures++; $display("FAIL no template below m"); end
    if (n_clean == 0)    begin failures++; $display("FAIL no group without conflict"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle clock"); end
    $display("dropped pixels: %0d of %0d (%0d.%02d%%)", n_drop, H * W,
             (n_drop * 100) / (H * W), ((n_drop * 10000) / (H * W)) % 100);
    if (out_px > 0)
      $display("PSNR against the grey original: %0.2f dB",
               10.0 * $log10(255.0 * 255.0 / (real'(sq_err) / real'(out_px))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
