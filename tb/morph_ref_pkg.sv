// morph_ref_pkg: straightforward reference models used by the testbenches of
// the image-processing blocks.  They work on whole images held in dynamic
// arrays (index r*W + c) and evaluate each window directly, with no line
// memories or counters, so they share no structure with the hardware.
//   threshold : fg = bg_bright ? (y < th) : (y > th)
//   erode     : AND over rows r-SH+1..r, cols c-SW+1..c, outside = 1
//   dilate    : OR  over the same window, outside = 0
package morph_ref_pkg;

  function automatic bit thresh(input byte unsigned y, input byte unsigned th, input bit bg_bright);
    return bg_bright ? (y < th) : (y > th);
  endfunction

  function automatic void morph(input bit src[], output bit dst[], input int w, input int h,
                                input int sw, input int sh, input bit dilate);
    dst = new[w * h];
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        bit acc;
        acc = dilate ? 1'b0 : 1'b1;
        for (int dr = 0; dr < sh; dr++) begin
          for (int dc = 0; dc < sw; dc++) begin
            int rr, cc;
            bit v;
            rr = r - dr;
            cc = c - dc;
            if (rr < 0 || cc < 0) v = dilate ? 1'b0 : 1'b1;
            else                  v = src[rr * w + cc];
            if (dilate) acc = acc | v;
            else        acc = acc & v;
          end
        end
        dst[r * w + c] = acc;
      end
    end
  endfunction

endpackage
