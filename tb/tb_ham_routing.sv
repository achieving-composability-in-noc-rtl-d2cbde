// tb_ham_routing: checks the Hamiltonian routing unit on a 4x4 mesh.
// The testbench builds its own table of path labels by walking the snake
// (left to right on even rows, right to left on odd rows), then for every
// (current, target) pair works out the expected direction by brute force
// over the four neighbours, and finally walks every route hop by hop to
// check that it ends at the target with strictly monotonic labels.
module tb_ham_routing;
  import qos_pkg::*;

  localparam int NX = 4, NY = 4;

  logic [3:0] cx, cy;
  logic [7:0] tgt;
  dir_e       dir;
  int checks = 0, failures = 0;
  int lab [NX][NY];

  ham_routing #(.NX(NX), .NY(NY)) dut (.cur_x_i(cx), .cur_y_i(cy), .target_i(tgt), .dir_o(dir));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic dir_e expect_dir(int x, int y, int tx, int ty);
    int lc, lt, best, bx, by;
    dir_e d;
    int dx [4] = '{0, 0, 1, -1};
    int dy [4] = '{1, -1, 0, 0};
    lc = lab[x][y]; lt = lab[tx][ty];
    d = DIR_LOCAL;
    if (lc == lt) return DIR_LOCAL;
    best = (lt > lc) ? -1 : 1000;
    for (int k = 0; k < 4; k++) begin
      bx = x + dx[k]; by = y + dy[k];
      if (bx < 0 || bx >= NX || by < 0 || by >= NY) continue;
      if (lt > lc && lab[bx][by] > lc && lab[bx][by] <= lt && lab[bx][by] > best) begin
        best = lab[bx][by]; d = dir_e'(k);
      end
      if (lt < lc && lab[bx][by] < lc && lab[bx][by] >= lt && lab[bx][by] < best) begin
        best = lab[bx][by]; d = dir_e'(k);
      end
    end
    return d;
  endfunction

  initial begin
    int l, x, y, hops, prev;
    l = 0;
    for (int r = 0; r < NY; r++)
      for (int c = 0; c < NX; c++) begin
        lab[(r % 2 == 0) ? c : NX - 1 - c][r] = l;
        l++;
      end
    // exhaustive comparison
    for (int sx = 0; sx < NX; sx++)
      for (int sy = 0; sy < NY; sy++)
        for (int tx = 0; tx < NX; tx++)
          for (int ty = 0; ty < NY; ty++) begin
            cx = 4'(sx); cy = 4'(sy); tgt = {4'(tx), 4'(ty)};
            #1;
            check(dir == expect_dir(sx, sy, tx, ty),
                  $sformatf("dir at (%0d,%0d) to (%0d,%0d): got %0d", sx, sy, tx, ty, dir));
          end
    // route walks
    for (int sx = 0; sx < NX; sx++)
      for (int sy = 0; sy < NY; sy++)
        for (int tx = 0; tx < NX; tx++)
          for (int ty = 0; ty < NY; ty++) begin
            x = sx; y = sy; hops = 0; prev = lab[sx][sy];
            tgt = {4'(tx), 4'(ty)};
            forever begin
              cx = 4'(x); cy = 4'(y); #1;
              if (dir == DIR_LOCAL || hops > NX * NY) break;
              case (dir)
                DIR_NORTH: y++;
                DIR_SOUTH: y--;
                DIR_EAST:  x++;
                default:   x--;
              endcase
              hops++;
              if (x < 0 || x >= NX || y < 0 || y >= NY) break;
              check((lab[tx][ty] > lab[sx][sy]) ? lab[x][y] > prev : lab[x][y] < prev,
                    "labels monotonic along route");
              prev = lab[x][y];
            end
            check(x == tx && y == ty, $sformatf("route (%0d,%0d)->(%0d,%0d) reaches target", sx, sy, tx, ty));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
