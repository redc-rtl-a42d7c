// tb_xy_route: exhaustive check of XY route computation.
// Every router position and every destination of an 8x8 mesh is applied; the
// expected direction is worked out from the coordinates (X first, then Y;
// rows grow towards South).
module tb_xy_route;
  import redc_pkg::*;

  logic [COORD_W-1:0] cur_x, cur_y;
  hdr_t               hdr;
  dir_e               dir;
  int checks = 0, failures = 0;

  xy_route dut (.cur_x(cur_x), .cur_y(cur_y), .hdr(hdr), .dir(dir));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dir_e exp;
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            cur_x = 3'(cx); cur_y = 3'(cy);
            hdr = '{dst_x: 3'(dx), dst_y: 3'(dy), src_x: 3'($urandom), src_y: 3'($urandom)};
            #1;
            if (dx != cx)      exp = (dx > cx) ? DIR_E : DIR_W;
            else if (dy != cy) exp = (dy > cy) ? DIR_S : DIR_N;
            else               exp = DIR_L;
            checks++;
            if (dir != exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %s exp %s",
                         cx, cy, dx, dy, dir.name(), exp.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
