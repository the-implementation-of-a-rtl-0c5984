// tb_route_logic: random node positions, destinations and BUSY/credit
// patterns. The chosen route is checked against a reference written from
// the routing rule: local delivery to the processor or diagnostic port on
// any free virtual channel; otherwise a free adaptive channel (1..4) on a
// productive direction, x before y, lowest channel first; otherwise the
// escape channel 0 in dimension order; otherwise no route.
`timescale 1ns/1ps
module tb_route_logic;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] my_x, my_y, dst_x, dst_y;
  logic to_diag;
  logic [NPORTS-1:0][NVC-1:0] busy, credit_ok;
  route_t route;
  int n_local = 0, n_adapt = 0, n_escape = 0, n_none = 0;

  route_logic dut (.*);

  function automatic route_t ref_route();
    route_t r;
    bit fr [NPORTS][NVC];
    int px, py;
    r = '0;
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NVC; v++) fr[p][v] = !busy[p][v] && credit_ok[p][v];
    px = dst_x > my_x ? 0 : 1;
    py = dst_y > my_y ? 2 : 3;
    if (dst_x == my_x && dst_y == my_y) begin
      int lp;
      lp = to_diag ? 5 : 4;
      for (int v = 0; v < NVC; v++)
        if (fr[lp][v]) return '{1'b1, PORT_W'(lp), VC_W'(v)};
      return r;
    end
    if (dst_x != my_x)
      for (int v = 1; v < NVC; v++) if (fr[px][v]) return '{1'b1, PORT_W'(px), VC_W'(v)};
    if (dst_y != my_y)
      for (int v = 1; v < NVC; v++) if (fr[py][v]) return '{1'b1, PORT_W'(py), VC_W'(v)};
    if (dst_x != my_x) begin
      if (fr[px][0]) return '{1'b1, PORT_W'(px), VC_W'(0)};
    end else if (fr[py][0]) return '{1'b1, PORT_W'(py), VC_W'(0)};
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      route_t e;
      my_x = COORD_W'($urandom % 4); my_y = COORD_W'($urandom % 4);
      dst_x = COORD_W'($urandom % 4); dst_y = COORD_W'($urandom % 4);
      to_diag = 1'($urandom);
      // mostly busy networks so all cases occur
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NVC; v++) begin
          busy[p][v]      = ($urandom % 100) < 70;
          credit_ok[p][v] = ($urandom % 100) < 80;
        end
      #1;
      e = ref_route();
      checks++;
      if (route != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %p expected %p", route, e);
      end
      if (!e.valid) n_none++;
      else if (e.port >= 4) n_local++;
      else if (e.vc == 0) n_escape++;
      else n_adapt++;
    end
    checks++;
    if (n_none == 0 || n_local == 0 || n_escape == 0 || n_adapt == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
