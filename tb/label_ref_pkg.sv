// label_ref_pkg: reference model and image generators for the labeling
// testbenches.
//
// The reference fills holes first: a background pixel belongs to the outside
// only if it is 4-connected to the frame border through background pixels;
// every other background pixel is a hole and is added to the foreground.
// The 8-connected components of that filled image are the expected clusters,
// numbered in raster order of their first (upper-left-most) pixel, which is the
// order in which a raster scan discovers them, with their bounding boxes.
package label_ref_pkg;

  typedef struct {
    int xmin, ymin, xmax, ymax;
    int first;        // raster index of the first pixel
  } comp_t;

  // Component id per pixel (-1 = background) and list of components.
  function automatic void ref_label(const ref bit img[], input int c, input int r,
                                    ref int comp[], ref comp_t comps[$]);
    bit outside[];
    int stack[$];
    outside = new[c*r];
    comp = new[c*r];
    comps.delete();
    // Outside background: flood fill from the border, 4-connected.
    for (int i = 0; i < c*r; i++) begin
      int x, y;
      x = i % c; y = i / c;
      if ((x == 0 || y == 0 || x == c-1 || y == r-1) && !img[i] && !outside[i]) begin
        outside[i] = 1; stack.push_back(i);
      end
    end
    while (stack.size() > 0) begin
      int i, x, y;
      i = stack.pop_back(); x = i % c; y = i / c;
      for (int k = 0; k < 4; k++) begin
        int nx, ny, j;
        nx = x + ((k == 0) ? 1 : (k == 1) ? -1 : 0);
        ny = y + ((k == 2) ? 1 : (k == 3) ? -1 : 0);
        if (nx < 0 || ny < 0 || nx >= c || ny >= r) continue;
        j = ny*c + nx;
        if (!img[j] && !outside[j]) begin outside[j] = 1; stack.push_back(j); end
      end
    end
    foreach (comp[i]) comp[i] = -1;
    // 8-connected components of the filled image.
    for (int i = 0; i < c*r; i++) begin
      if (!outside[i] && comp[i] < 0) begin
        comp_t cc;
        int id;
        id = comps.size();
        cc.xmin = i % c; cc.xmax = i % c; cc.ymin = i / c; cc.ymax = i / c; cc.first = i;
        comp[i] = id; stack.push_back(i);
        while (stack.size() > 0) begin
          int p, x, y;
          p = stack.pop_back(); x = p % c; y = p / c;
          if (x < cc.xmin) cc.xmin = x;
          if (x > cc.xmax) cc.xmax = x;
          if (y < cc.ymin) cc.ymin = y;
          if (y > cc.ymax) cc.ymax = y;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              int nx, ny, j;
              nx = x + dx; ny = y + dy;
              if (nx < 0 || ny < 0 || nx >= c || ny >= r) continue;
              j = ny*c + nx;
              if (!outside[j] && comp[j] < 0) begin comp[j] = id; stack.push_back(j); end
            end
        end
        comps.push_back(cc);
      end
    end
  endfunction

  // Draw one random shape into the box (x0, y0, w, h).
  function automatic void draw_shape(ref bit img[], input int c, input int x0, input int y0,
                                     input int w, input int h, input int kind);
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) begin
        bit v;
        int u, t;
        u = x - x0; t = y - y0;
        case (kind)
          0: v = 1;                                                    // filled box
          1: v = (u == 0 || t == 0 || u == w-1 || t == h-1);           // ring with a hole
          2: v = (u == 0 || u == w-1 || t == h-1);                     // U, open at the top
          3: v = (t == 0 || u == 0 || u == w-1);                       // upside-down U
          4: v = (u * h == t * w) || (u * h == (h-1-t) * w);           // diagonal cross
          5: v = ((u-w/2)*(u-w/2)*h*h + (t-h/2)*(t-h/2)*w*w <= w*w*h*h/4); // ellipse
          6: v = ($urandom_range(99) < 65);                            // ragged blob
          default: v = (u % 2 == 0) || (t == 0);                       // comb
        endcase
        if (v) img[y*c + x] = 1;
      end
  endfunction

endpackage
