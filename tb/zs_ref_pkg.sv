// zs_ref_pkg -- reference model of Zhang-Suen thinning for the testbenches.
//
// ZsRef holds a binary image (up to 96 x 96, row 0 at the top, pixels
// outside the image read as white) and thins it the way the processor
// should: sub-iterations on a snapshot of the image, first / second
// condition sets alternating, stopping after a whole iteration that erases
// nothing. It is written directly from the algorithm's statement, with the
// neighbours looked up by their row/column offsets, and shares no code with
// the RTL. It also counts why pixels were kept or erased so a testbench can
// show that each rule was exercised.
package zs_ref_pkg;

  localparam int MAXD = 96;

  class ZsRef;
    int h, w;
    bit img [MAXD][MAXD];
    int iterations;
    // statistics
    int erased_step1, erased_step2, erased_border;
    int kept_n_low, kept_n_high, kept_s, kept_c34;

    function new(int h_, int w_);
      h = h_;
      w = w_;
      clear();
    endfunction

    function void clear();
      for (int r = 0; r < MAXD; r++)
        for (int c = 0; c < MAXD; c++)
          img[r][c] = 1'b0;
    endfunction

    function bit px(int r, int c);
      if (r < 0 || r >= h || c < 0 || c >= w) return 1'b0;
      return img[r][c];
    endfunction

    // Neighbour Pk of (r, c): P1 lower left, counter-clockwise to P8 left.
    function bit nbr(int r, int c, int k);
      case (k)
        1: return px(r + 1, c - 1);
        2: return px(r + 1, c);
        3: return px(r + 1, c + 1);
        4: return px(r, c + 1);
        5: return px(r - 1, c + 1);
        6: return px(r - 1, c);
        7: return px(r - 1, c - 1);
        8: return px(r, c - 1);
        default: return 1'b0;
      endcase
    endfunction

    // Decision for one pixel; also counts the first rule that keeps it.
    function bit should_erase(int r, int c, bit second, bit count_stats);
      int n, s;
      bit p [10];
      bit c3, c4;
      if (!px(r, c)) return 1'b0;
      for (int k = 1; k <= 8; k++) p[k] = nbr(r, c, k);
      p[9] = p[1];
      n = 0;
      s = 0;
      for (int k = 1; k <= 8; k++) n += int'(p[k]);
      for (int k = 1; k <= 8; k++) if (p[k] == 1'b1 && p[k+1] == 1'b0) s++;
      if (!second) begin
        c3 = (p[2] & p[6] & p[8]) == 1'b0;
        c4 = (p[4] & p[6] & p[8]) == 1'b0;
      end else begin
        c3 = (p[2] & p[4] & p[8]) == 1'b0;
        c4 = (p[2] & p[4] & p[6]) == 1'b0;
      end
      if (n < 2)        begin if (count_stats) kept_n_low++;  return 1'b0; end
      if (n > 6)        begin if (count_stats) kept_n_high++; return 1'b0; end
      if (s != 1)       begin if (count_stats) kept_s++;      return 1'b0; end
      if (!(c3 && c4))  begin if (count_stats) kept_c34++;    return 1'b0; end
      return 1'b1;
    endfunction

    // One sub-iteration; returns the number of pixels erased.
    function int sub_iteration(bit second);
      bit del [MAXD][MAXD];
      int cnt;
      cnt = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          del[r][c] = should_erase(r, c, second, 1'b1);
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          if (del[r][c]) begin
            img[r][c] = 1'b0;
            cnt++;
            if (r == 0 || c == 0 || r == h - 1 || c == w - 1) erased_border++;
          end
      if (second) erased_step2 += cnt;
      else        erased_step1 += cnt;
      return cnt;
    endfunction

    // Thin to the end; returns the number of whole iterations.
    function int run();
      int e1, e2;
      iterations = 0;
      do begin
        e1 = sub_iteration(1'b0);
        e2 = sub_iteration(1'b1);
        iterations++;
      end while (e1 + e2 != 0);
      return iterations;
    endfunction

    function int black_count();
      int n;
      n = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          n += int'(img[r][c]);
      return n;
    endfunction

    // Test images -------------------------------------------------------
    // Random filled rectangles and discs.
    function void random_blobs(int count);
      clear();
      for (int i = 0; i < count; i++) begin
        int r0, c0, hh, ww, kind;
        r0   = int'($urandom_range(h - 1));
        c0   = int'($urandom_range(w - 1));
        hh   = 2 + int'($urandom_range(h / 2));
        ww   = 2 + int'($urandom_range(w / 2));
        kind = int'($urandom_range(1));
        for (int r = 0; r < h; r++)
          for (int c = 0; c < w; c++) begin
            if (kind == 0) begin
              if (r >= r0 && r < r0 + hh && c >= c0 && c < c0 + ww) img[r][c] = 1'b1;
            end else begin
              if ((r - r0) * (r - r0) * 4 + (c - c0) * (c - c0) * 4 <= hh * ww) img[r][c] = 1'b1;
            end
          end
      end
    endfunction

    // Fingerprint-like pattern: ridges falling to the right with a slope of
    // 1/2, drawn as the bands 0 <= (2r - c + wobble) mod period < thick,
    // where wobble bends the ridges slowly and roughens their edges by one
    // pixel at random. period 22 and thick 11 give ridges about 5 pixels
    // thick, 10 pixels apart.
    function void ridges(int period, int thick);
      clear();
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          int ph;
          ph = (2 * r - c + 4 * period + (r * c) / 211 + int'($urandom_range(1))) % period;
          img[r][c] = (ph < thick);
        end
    endfunction
  endclass

endpackage
