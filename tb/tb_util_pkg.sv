// Dual-rail encode/decode helpers shared by the testbenches.
package tb_util_pkg;
  import aes_dr_pkg::*;

  function automatic dr_block_t enc128(logic [127:0] v);
    dr_block_t r;
    for (int i = 0; i < 128; i++) r[i] = '{t: v[i], f: ~v[i]};
    return r;
  endfunction

  // True when every bit is a valid pair; v gets the true rails.
  function automatic bit dec128(dr_block_t d, output logic [127:0] v);
    bit ok = 1;
    for (int i = 0; i < 128; i++) begin
      v[i] = d[i].t;
      ok &= (d[i].t ^ d[i].f);
    end
    return ok;
  endfunction

  function automatic bit is_null128(dr_block_t d);
    return d == '0;
  endfunction

  function automatic dr_byte_t enc8(logic [7:0] v);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) r[i] = '{t: v[i], f: ~v[i]};
    return r;
  endfunction

  function automatic bit dec8(dr_byte_t d, output logic [7:0] v);
    bit ok = 1;
    for (int i = 0; i < 8; i++) begin
      v[i] = d[i].t;
      ok &= (d[i].t ^ d[i].f);
    end
    return ok;
  endfunction
endpackage
