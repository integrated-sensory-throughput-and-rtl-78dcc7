// tb_route_compute: self-checking testbench of XY routing.
//
// One routing unit per node of a 3 x 3 mesh; every destination is applied
// and the output port is compared with the rule: east/west while the column
// differs, then north/south (north is smaller y), then local.
module tb_route_compute;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] dx, dy;
  port_e res [9];

  for (genvar y = 0; y < 3; y++) begin : g_y
    for (genvar x = 0; x < 3; x++) begin : g_x
      route_compute #(.MY_X(x), .MY_Y(y)) dut (.dst_x(dx), .dst_y(dy), .out_port(res[y*3+x]));
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ty = 0; ty < 3; ty++) begin
      for (int tx = 0; tx < 3; tx++) begin
        dx = COORD_W'(tx); dy = COORD_W'(ty);
        #1;
        for (int y = 0; y < 3; y++) begin
          for (int x = 0; x < 3; x++) begin
            port_e e;
            if (tx > x) e = PORT_E;
            else if (tx < x) e = PORT_W;
            else if (ty > y) e = PORT_S;
            else if (ty < y) e = PORT_N;
            else e = PORT_L;
            checks++;
            if (res[y*3+x] != e) begin
              failures++;
              $display("FAIL node (%0d,%0d) dst (%0d,%0d): %s expected %s", x, y, tx, ty, res[y*3+x].name(), e.name());
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
