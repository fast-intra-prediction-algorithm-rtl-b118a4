// tb_pred: checks the directional predictor: all eight directional 4x4 modes against the per-mode equations of H.264/AVC written with p[x,y] indexing, the 8x8 modes on all four quadrants, and 16x16 / chroma vertical and horizontal on every 4x4 group.
module tb_pred;
  import intra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  psize_e size; logic [3:0] mode, quad; pix_t top [16], left [16], corner, pix [16];
  pred dut (.*);
  // p(x,y) with x = -1 the left column, y = -1 the top row
  function automatic int p(input int x, input int y);
    if (x < 0 && y < 0) return int'(corner);
    if (y < 0) return int'(top[x]);
    return int'(left[y]);
  endfunction
  function automatic int ref4(input int m, input int x, input int y);
    int z;
    case (m)
      0: return p(x, -1);
      1: return p(-1, y);
      3: return (x == 3 && y == 3) ? (p(6,-1) + 3*p(7,-1) + 2) >> 2
                                   : (p(x+y,-1) + 2*p(x+y+1,-1) + p(x+y+2,-1) + 2) >> 2;
      4: begin
        if (x > y) return (p(x-y-2,-1) + 2*p(x-y-1,-1) + p(x-y,-1) + 2) >> 2;
        if (x < y) return (p(-1,y-x-2) + 2*p(-1,y-x-1) + p(-1,y-x) + 2) >> 2;
        return (p(0,-1) + 2*p(-1,-1) + p(-1,0) + 2) >> 2;
      end
      5: begin
        z = 2*x - y;
        case (z)
          0, 2, 4, 6: return (p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 1) >> 1;
          1, 3, 5:    return (p(x-(y>>1)-2,-1) + 2*p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 2) >> 2;
          -1:         return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
          default:    return (p(-1,y-1) + 2*p(-1,y-2) + p(-1,y-3) + 2) >> 2;
        endcase
      end
      6: begin
        z = 2*y - x;
        case (z)
          0, 2, 4, 6: return (p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 1) >> 1;
          1, 3, 5:    return (p(-1,y-(x>>1)-2) + 2*p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 2) >> 2;
          -1:         return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
          default:    return (p(x-1,-1) + 2*p(x-2,-1) + p(x-3,-1) + 2) >> 2;
        endcase
      end
      7: return (y == 0 || y == 2) ? (p(x+(y>>1),-1) + p(x+(y>>1)+1,-1) + 1) >> 1
                                   : (p(x+(y>>1),-1) + 2*p(x+(y>>1)+1,-1) + p(x+(y>>1)+2,-1) + 2) >> 2;
      8: begin
        z = x + 2*y;
        case (z)
          0, 2, 4: return (p(-1,y+(x>>1)) + p(-1,y+(x>>1)+1) + 1) >> 1;
          1, 3:    return (p(-1,y+(x>>1)) + 2*p(-1,y+(x>>1)+1) + p(-1,y+(x>>1)+2) + 2) >> 2;
          5:       return (p(-1,2) + 3*p(-1,3) + 2) >> 2;
          default: return p(-1,3);
        endcase
      end
      default: return -1;
    endcase
  endfunction
  // 8x8 equations (on already filtered references)
  function automatic int ref8(input int m, input int x, input int y);
    int z;
    case (m)
      0: return p(x, -1);
      1: return p(-1, y);
      3: return (x == 7 && y == 7) ? (p(14,-1) + 3*p(15,-1) + 2) >> 2
                                   : (p(x+y,-1) + 2*p(x+y+1,-1) + p(x+y+2,-1) + 2) >> 2;
      4: begin
        if (x > y) return (p(x-y-2,-1) + 2*p(x-y-1,-1) + p(x-y,-1) + 2) >> 2;
        if (x < y) return (p(-1,y-x-2) + 2*p(-1,y-x-1) + p(-1,y-x) + 2) >> 2;
        return (p(0,-1) + 2*p(-1,-1) + p(-1,0) + 2) >> 2;
      end
      5: begin
        z = 2*x - y;
        if (z >= 0 && (z & 1) == 0) return (p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 1) >> 1;
        if (z >= 0) return (p(x-(y>>1)-2,-1) + 2*p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(-1,y-2*x-1) + 2*p(-1,y-2*x-2) + p(-1,y-2*x-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && (z & 1) == 0) return (p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 1) >> 1;
        if (z >= 0) return (p(-1,y-(x>>1)-2) + 2*p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(x-2*y-1,-1) + 2*p(x-2*y-2,-1) + p(x-2*y-3,-1) + 2) >> 2;
      end
      7: return ((y & 1) == 0) ? (p(x+(y>>1),-1) + p(x+(y>>1)+1,-1) + 1) >> 1
                               : (p(x+(y>>1),-1) + 2*p(x+(y>>1)+1,-1) + p(x+(y>>1)+2,-1) + 2) >> 2;
      8: begin
        z = x + 2*y;
        if (z > 13) return p(-1,7);
        if (z == 13) return (p(-1,6) + 3*p(-1,7) + 2) >> 2;
        if ((z & 1) == 0) return (p(-1,y+(x>>1)) + p(-1,y+(x>>1)+1) + 1) >> 1;
        return (p(-1,y+(x>>1)) + 2*p(-1,y+(x>>1)+1) + p(-1,y+(x>>1)+2) + 2) >> 2;
      end
      default: return -1;
    endcase
  endfunction
  int modes [8] = '{0, 1, 3, 4, 5, 6, 7, 8};
  initial begin
    for (int n = 0; n < 60; n++) begin
      for (int i = 0; i < 16; i++) begin top[i] = 8'($urandom); left[i] = 8'($urandom); end
      corner = 8'($urandom);
      if (n == 0) begin for (int i = 0; i < 16; i++) begin top[i] = 8'd255; left[i] = 8'd255; end corner = 8'd255; end
      // 4x4
      size = PS_4X4; quad = 0;
      foreach (modes[k]) begin
        mode = 4'(modes[k]); #1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          check(int'(pix[4*y+x]) == ref4(modes[k], x, y), $sformatf("4x4 mode %0d (%0d,%0d)", modes[k], x, y));
      end
      // 8x8, four quadrants
      size = PS_8X8;
      foreach (modes[k]) for (int q = 0; q < 4; q++) begin
        mode = 4'(modes[k]); quad = 4'(q); #1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          check(int'(pix[4*y+x]) == ref8(modes[k], 4*(q%2)+x, 4*(q/2)+y), $sformatf("8x8 mode %0d q%0d", modes[k], q));
      end
      // 16x16 and chroma, vertical and horizontal
      for (int m = 0; m < 2; m++) begin
        size = PS_16X16; mode = 4'(m);
        for (int q = 0; q < 16; q++) begin
          quad = 4'(q); #1;
          for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
            check(int'(pix[4*y+x]) == (m == 0 ? int'(top[4*(q%4)+x]) : int'(left[4*(q/4)+y])), "16x16 V/H");
        end
        size = PS_CHROMA;
        for (int q = 0; q < 4; q++) begin
          quad = 4'(q); #1;
          for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
            check(int'(pix[4*y+x]) == (m == 0 ? int'(top[4*(q%2)+x]) : int'(left[4*(q/2)+y])), "chroma V/H");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
