// morph_ref_pkg: reference model for the morphology testbenches.
//
// Computes erosion or dilation of a binary image (row-major, width c, height
// r) by a w x h rectangle of ones straight from the definitions: erosion is
// the AND of the window with outside pixels taken as 1, dilation the OR with
// outside pixels taken as 0. For output column cx the window covers input
// columns cx + w/2 - w + 1 .. cx + w/2 (integer division), likewise for rows;
// for odd sizes this is the window centred on the output pixel.
package morph_ref_pkg;

  function automatic bit ref_pixel(const ref bit img[], input int c, input int r,
                                   input int w, input int h, input bit dilate,
                                   input int cx, input int cy);
    bit acc;
    acc = dilate ? 1'b0 : 1'b1;
    for (int yy = cy + h/2 - h + 1; yy <= cy + h/2; yy++) begin
      for (int xx = cx + w/2 - w + 1; xx <= cx + w/2; xx++) begin
        bit v;
        if (xx < 0 || yy < 0 || xx >= c || yy >= r) v = dilate ? 1'b0 : 1'b1;
        else v = img[yy*c + xx];
        if (dilate) acc = acc | v;
        else        acc = acc & v;
      end
    end
    return acc;
  endfunction

  function automatic void ref_image(const ref bit img[], input int c, input int r,
                                    input int w, input int h, input bit dilate,
                                    ref bit res[]);
    res = new[c*r];
    for (int y = 0; y < r; y++)
      for (int x = 0; x < c; x++)
        res[y*c + x] = ref_pixel(img, c, r, w, h, dilate, x, y);
  endfunction

  // Random noisy mask: blobs plus isolated noise pixels.
  function automatic void rand_image(input int c, input int r, input int density,
                                     ref bit img[]);
    img = new[c*r];
    foreach (img[i]) img[i] = ($urandom_range(99) < density);
  endfunction

endpackage
