// tb_roba_image_filter -- image smoothing and sharpening with the signed RoBA
// multiplier, the kind of error-tolerant workload the multiplier targets.
//
// A 32 x 32 8-bit grayscale test image is generated here (a diagonal ramp
// with a bright square and a checkerboard patch, so that it has both smooth
// areas and edges). Two 3 x 3 masks are applied, every pixel-by-coefficient
// product going through the multiplier:
//   smoothing:  [1 2 1; 2 4 2; 1 2 1] / 16
//   sharpening: [0 -1 0; -1 5 -1; 0 -1 0]   (result clipped to 0..255)
// The masks are common textbook choices; the description of the
// applications does not list its masks.
//
// Pixels 0..255 need 9 bits in two's complement, so the multiplier is used
// at N = 16 here. Checks: every product equals the reference model; every
// smoothed sum lies within a ninth of the exact sum (all its terms are
// non-negative, so the per-product bound adds up). The PSNR of both filtered
// images against exactly computed ones is printed.
module tb_roba_image_filter;
  import roba_ref_pkg::*;

  localparam int unsigned N   = 16;
  localparam int          DIM = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_neg = 0, n_above = 0, n_below = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  roba_signed_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p));

  int img [DIM][DIM];
  int smooth_k [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
  int sharp_k  [3][3] = '{'{0, -1, 0}, '{-1, 5, -1}, '{0, -1, 0}};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One product through the multiplier, checked against the reference.
  task automatic mul(int x, int y, output longint prod);
    longint e, exact;
    a = x[N-1:0];
    b = y[N-1:0];
    @(posedge clk);
    prod  = longint'($signed(p));
    e     = ref_sprod(longint'(x), longint'(y), N);
    exact = longint'(x) * y;
    checks++;
    if (prod != e) begin
      failures++;
      if (failures < 10) $display("%0d x %0d: got %0d expected %0d", x, y, prod, e);
    end
    if (prod < 0) n_neg++;
    if (prod > exact) n_above++;
    if (prod < exact) n_below++;
  endtask

  function automatic int clip(longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : int'(v);
  endfunction

  function automatic int pix(int r, int c);
    int rr, cc;
    rr = (r < 0) ? 0 : (r >= DIM) ? DIM - 1 : r;
    cc = (c < 0) ? 0 : (c >= DIM) ? DIM - 1 : c;
    return img[rr][cc];
  endfunction

  initial begin
    real se_smooth, se_sharp, psnr_smooth, psnr_sharp;
    se_smooth = 0.0;
    se_sharp  = 0.0;
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        int v;
        v = (r + c) * 4;
        if (r >= 8 && r < 16 && c >= 8 && c < 16) v = 230;
        if (r >= 20 && c >= 20) v = (((r + c) % 2) == 1) ? 200 : 40;
        img[r][c] = (v > 255) ? 255 : v;
      end

    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        longint acc_s, acc_h, ex_s, ex_h, prod;
        int out_s, out_h, ref_s, ref_h;
        acc_s = 0; acc_h = 0; ex_s = 0; ex_h = 0;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            int px;
            px = pix(r + i - 1, c + j - 1);
            mul(px, smooth_k[i][j], prod);
            acc_s += prod;
            ex_s  += longint'(px) * smooth_k[i][j];
            if (sharp_k[i][j] != 0) begin
              mul(px, sharp_k[i][j], prod);
              acc_h += prod;
              ex_h  += longint'(px) * sharp_k[i][j];
            end
          end
        checks++;
        if (9 * ((acc_s > ex_s) ? acc_s - ex_s : ex_s - acc_s) > ex_s) begin
          failures++;
          $display("pixel (%0d,%0d): smoothed sum %0d too far from %0d", r, c, acc_s, ex_s);
        end
        out_s = clip(acc_s / 16);
        ref_s = clip(ex_s / 16);
        out_h = clip(acc_h);
        ref_h = clip(ex_h);
        se_smooth += real'((out_s - ref_s) * (out_s - ref_s));
        se_sharp  += real'((out_h - ref_h) * (out_h - ref_h));
      end

    psnr_smooth = (se_smooth == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * DIM * DIM / se_smooth);
    psnr_sharp  = (se_sharp  == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * DIM * DIM / se_sharp);
    $display("smoothing PSNR %0.2f dB, sharpening PSNR %0.2f dB (against exact filtering)",
             psnr_smooth, psnr_sharp);
    checks++; if (n_neg   == 0) begin failures++; $display("no negative product"); end
    checks++; if (n_above == 0) begin failures++; $display("no product above exact"); end
    checks++; if (n_below == 0) begin failures++; $display("no product below exact"); end
    $display("negative products %0d, above exact %0d, below exact %0d", n_neg, n_above, n_below);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_image_filter
