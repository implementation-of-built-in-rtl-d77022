// tb_misr_ref_pkg: reference model of the signature register for the
// testbenches, written stage by stage rather than as a word operation so
// that it is independent of the RTL.
//
// misr_step: one clock of an 8-stage MISR. Stage 0 takes D0 XOR the fed-back
// last stage if tap 0 is set; stage i takes D(i) XOR Q(i-1), XOR the last
// stage if tap i is set.
// misr_sig: the signature after `cycles` clocks from an empty register with
// the word held on the inputs.
package tb_misr_ref_pkg;

  localparam logic [7:0] REF_POLY = 8'b1101_1001;

  function automatic logic [7:0] misr_step(logic [7:0] q, logic [7:0] d,
                                           logic [7:0] poly = REF_POLY);
    logic [7:0] n;
    for (int i = 0; i < 8; i++) begin
      logic prev;
      prev = (i == 0) ? 1'b0 : q[i-1];
      n[i] = d[i] ^ prev ^ (poly[i] & q[7]);
    end
    return n;
  endfunction

  function automatic logic [7:0] misr_sig(logic [7:0] d, int cycles = 5);
    logic [7:0] q = '0;
    repeat (cycles) q = misr_step(q, d);
    return q;
  endfunction

endpackage
