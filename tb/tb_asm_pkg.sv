// tb_asm_pkg: testbench helpers for the Mandelbrot ASIP.
//
// enc() assembles one 24-bit instruction in the [opcode|r|s|t|0000] format;
// iss_model is an instruction-level reference model of the instruction set,
// written from the instruction definitions (one instruction at a time, no
// pipeline), against which the RTL's results are compared.
package tb_asm_pkg;
  import asip_pkg::*;

  function automatic logic [23:0] enc(opcode_e op, int r, int s, int t);
    return {8'(op), 4'(r), 4'(s), 4'(t), 4'b0000};
  endfunction

  function automatic logic [23:0] enc_movi(int r, int imm);
    return {8'(OP_MOVI), 4'(r), 8'(imm), 4'b0000};
  endfunction

  class iss_model;
    int unsigned ar [16];
    longint      cre [16];   // components kept as 32-bit values in longints
    longint      cim [16];
    byte unsigned mem [int unsigned];

    function new();
      foreach (ar[i]) begin ar[i] = 0; cre[i] = 0; cim[i] = 0; end
    endfunction

    static function longint s32(longint v);
      return longint'(signed'(32'(v)));
    endfunction

    static function longint s16(longint v);
      return longint'(signed'(16'(v)));
    endfunction

    function longint rd(int unsigned a, int n);
      longint v = 0;
      for (int i = n - 1; i >= 0; i--) begin
        byte unsigned b = mem.exists((a + i) % 2048) ? mem[(a + i) % 2048] : 8'h00;
        v = (v << 8) | longint'(b);
      end
      return v;
    endfunction

    function void wr(int unsigned a, int n, longint v);
      for (int i = 0; i < n; i++) mem[(a + i) % 2048] = 8'(v >> (8 * i));
    endfunction

    function void step(logic [23:0] ins);
      int op = ins[23:16], r = ins[15:12], s = ins[11:8], t = ins[7:4];
      int n;
      int unsigned a;
      longint v;
      if (ins[3:0] != 0) return;
      n = (op inside {8'h64, 8'h67}) ? 2 : (op inside {8'h65, 8'h68}) ? 4 : 8;
      a = (ar[s] + t * n) & ~(n - 1);
      case (op)
        8'h80: ar[r] = ar[s] + ar[t];
        8'h81: ar[r] = int'(signed'(ins[11:4]));
        8'h60: begin cre[r] = s32(cre[s] + cre[t]); cim[r] = s32(cim[s] + cim[t]); end
        8'h61: begin cre[r] = s32(cre[s] - cre[t]); cim[r] = s32(cim[s] - cim[t]); end
        8'h62: begin
          longint xr = cre[s], xi = cim[s], yr = cre[t], yi = cim[t];
          cre[r] = s32(xr * yr - xi * yi); cim[r] = s32(xr * yi + xi * yr);
        end
        8'h63: begin
          longint xr = cre[s], xi = cim[s];
          cre[r] = s32(xr * xr - xi * xi); cim[r] = s32(2 * xr * xi);
        end
        8'h64: begin cre[r] = s16(rd(a, 2)); cim[r] = 0; end
        8'h65: begin v = rd(a, 4); cre[r] = s16(v >> 16); cim[r] = s16(v); end
        8'h66: begin v = rd(a, 8); cre[r] = s32(v >> 32); cim[r] = s32(v); end
        8'h67: wr(a, 2, cre[r]);
        8'h68: wr(a, 4, ((cre[r] & 'hFFFF) << 16) | (cim[r] & 'hFFFF));
        8'h69: wr(a, 8, ((cre[r] & 'hFFFF_FFFF) << 32) | (cim[r] & 'hFFFF_FFFF));
        8'h6A: begin cre[r] = s32(longint'(ar[s])); cim[r] = s32(longint'(ar[t])); end
        8'h6B: begin cre[r] = cre[s]; cim[r] = cim[s]; end
        default: ;
      endcase
    endfunction
  endclass

endpackage
