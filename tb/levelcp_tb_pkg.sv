// levelcp_tb_pkg: reference functions shared by the Level C+ testbenches.
//
// pix() is the content of the synthetic reference frames held by the external
// memory models: a hash of (frame, x, y) so that a pixel fetched from the wrong
// place, frame or edge shows up as a wrong value. clampi() is the edge rule the
// design uses for pixels outside the frame (nearest edge pixel).
package levelcp_tb_pkg;

  function automatic logic [7:0] pix(input int r, input int x, input int y);
    int h;
    h = (x * 31) ^ (y * 17) ^ (r * 89) ^ ((x >> 3) * (y >> 2)) ^ (y >> 5);
    return 8'(h + (h >> 8));
  endfunction

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : ((v > hi) ? hi : v);
  endfunction

endpackage
