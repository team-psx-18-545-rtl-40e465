// tb_psx_pkg: checks the shared address decode (every region boundary and
// random addresses in and between regions) and the four semi-transparency
// blends of the package against values worked out here per channel.
module tb_psx_pkg;
  import psx_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic region_e ref_region(input longint a);
    if (a < 64'h80_0000) return REG_RAM;
    if (a >= 64'h1F80_0000 && a <= 64'h1F80_03FF) return REG_SCRATCH;
    if (a >= 64'h1F80_1000 && a <= 64'h1F80_2FFF) return REG_IO;
    if (a >= 64'h1FC0_0000 && a <= 64'h1FC7_FFFF) return REG_BIOS;
    return REG_NONE;
  endfunction
  initial begin
    longint edges [$];
    edges = '{0, 64'h7F_FFFC, 64'h80_0000, 64'h1F7F_FFFC, 64'h1F80_0000, 64'h1F80_03FC,
              64'h1F80_0400, 64'h1F80_0FFC, 64'h1F80_1000, 64'h1F80_2FFC, 64'h1F80_3000,
              64'h1FBF_FFFC, 64'h1FC0_0000, 64'h1FC7_FFFC, 64'h1FC8_0000, 64'h1FFF_FFFC};
    foreach (edges[i]) chk(region_of(29'(edges[i])) == ref_region(edges[i]), $sformatf("region %h", edges[i]));
    for (int n = 0; n < 2000; n++) begin
      longint a;
      a = (n % 2) ? longint'($urandom_range(0, 32'h1FFF_FFFF)) : 64'h1F80_0000 + longint'($urandom_range(0, 32'h007F_FFFF));
      chk(region_of(29'(a)) == ref_region(a), $sformatf("region %h", a));
    end
    for (int n = 0; n < 2000; n++) begin
      logic [14:0] b, f, r;
      logic [1:0] m;
      b = 15'($urandom); f = 15'($urandom); m = 2'($urandom);
      r = blend555(b, f, m);
      for (int c = 0; c < 3; c++) begin
        int bc, fc, e;
        bc = b[c*5 +: 5]; fc = f[c*5 +: 5];
        case (m)
          0: e = (bc + fc) / 2;
          1: e = bc + fc;
          2: e = bc - fc;
          default: e = bc + fc / 4;
        endcase
        if (e < 0) e = 0;
        if (e > 31) e = 31;
        chk(int'(r[c*5 +: 5]) == e, $sformatf("blend mode %0d channel %0d", m, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
