// cam_ref_pkg: the test image the camera model produces, shared by the
// model and the checking testbenches. Each pixel is a 16-bit RGB565 value
// that depends on the frame number and the position, so that frames and
// pixels can be told apart.
package cam_ref_pkg;
  function automatic logic [15:0] pixel_value(int frame, int x, int y);
    logic [31:0] h;
    h = 32'(frame) * 32'h9e3779b1 ^ 32'(x) * 32'h85ebca6b ^ 32'(y) * 32'hc2b2ae35;
    h = h ^ (h >> 15);
    return h[15:0];
  endfunction
endpackage
