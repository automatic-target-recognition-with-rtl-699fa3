// r0_scene.svh: synthetic Round 0 test scenes for the testbenches, for
// inclusion in a testbench module (after atr_ref.svh). An image of 8-bit
// pixels, IMG_W wide and stored row after row, holds a noisy background
// with small hot and cold blobs; a template pair puts its 30 target points
// inside a blob-sized window and its 30 background points on a ring around
// it. ref_rois lists in scene_rois, in scan order, the pixels of an area that the Round 0
// equations mark as regions of interest, using the five most significant
// bits of each pixel as the hardware does.

  logic [7:0] scene_img [];
  logic [15:0] scene_off [60];

  function automatic void make_image(input int rows, input int width, input int seed);
    int unsigned s;
    s = $urandom(seed);
    scene_img = new[rows * width + 1];
    foreach (scene_img[i]) scene_img[i] = 8'($urandom_range(100, 40));
    // blobs: about one per 60 pixels, 3 x 5 pixels
    for (int b = 0; b < rows * width / 60; b++) begin
      int r0, c0;
      bit hot;
      r0  = $urandom_range(rows - 3);
      c0  = $urandom_range(width - 5);
      hot = $urandom_range(2) != 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 5; c++)
          scene_img[(r0 + r) * width + c0 + c] =
            hot ? 8'($urandom_range(255, 200)) : 8'($urandom_range(20));
    end
  endfunction

  // template pair: 30 background points on a ring of radius ~3 rows x 8
  // columns, 30 target points inside a 3 x 5 window
  function automatic void make_template(input int width);
    for (int i = 0; i < 30; i++) begin
      int dr, dc;
      case (i % 4)
        0: begin dr = -3; dc = $urandom_range(16) - 8; end
        1: begin dr =  3; dc = $urandom_range(16) - 8; end
        2: begin dr = $urandom_range(6) - 3; dc = -8; end
        default: begin dr = $urandom_range(6) - 3; dc = 8; end
      endcase
      scene_off[i] = 16'(dr * width + dc);
    end
    for (int i = 0; i < 30; i++)
      scene_off[30 + i] = 16'(($urandom_range(2) - 1) * width + $urandom_range(4) - 2);
  endfunction

  function automatic bit ref_pixel(input int p);
    int unsigned b [30], t [30];
    logic [15:0] a;
    logic [7:0]  v;
    for (int i = 0; i < 30; i++) begin
      a = 16'(p) + scene_off[i];
      v = scene_img[a];
      b[i] = 32'(v[7:3]);
      a = 16'(p) + scene_off[30 + i];
      v = scene_img[a];
      t[i] = 32'(v[7:3]);
    end
    return ref_assert(ref_conv(ref_temp(b, t)));
  endfunction

  int scene_rois [$];

  function automatic void ref_rois(input int base, input int dx, input int dy,
                                   input int width);
    scene_rois.delete();
    for (int r = 0; r < dy; r++)
      for (int c = 0; c < dx; c++)
        if (ref_pixel(base + r * width + c)) scene_rois.push_back(base + r * width + c);
  endfunction
