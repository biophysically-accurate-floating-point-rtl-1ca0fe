// np_ucode_pkg: FSMC micro-programs of the four neuroprocessor kinds.
//
// Each program runs once per virtual cell and time step. Parameter offsets are
// relative to the cell's 62-word block in the parameter-and-result memory
// (word 12 is the membrane voltage or, for the synapse, the time since the
// last accepted spike; words 8..11 are results). All arithmetic is single
// precision. The comment on each line gives the operation in terms of named
// variables of the internal memory.
// Word 0 of each cell block is the cell configuration word (integer bits):
// bit 0 left end sealed and bit 1 right end sealed (the axial conductance to
// that side is taken as zero; a soma's dendrite is on its right), bit 2 the
// soma's stimulus input is on. The programs test it with OP_BRV.
//
//  * dend_ucode: passive compartment of the cable equation
//      C dV/dt = Ie - gL (V - EL) - isyn + gl (Vl - V) + gr (Vr - V)
//    exponential Euler: V' = Vinf + (V - Vinf) exp(-G dt / C), with
//      G = gL + gl + gr and Vinf = (Ie + gL EL - isyn + gl Vl + gr Vr) / G;
//    backward Euler (CONFIG1 bit 2): the row a V'(j-1) + b V'(j) + c V'(j+1) = d
//      with a = -gl, b = C/dt + G, c = -gr, d = (C/dt) V + Ie + gL EL - isyn,
//      written to words 8..11 for the host, which solves the tridiagonal
//      system of all compartments and writes the new V back to word 12.
//    Active compartment (CONFIG1 bit 3), reduced Traub dendrite: before the
//    branch the program adds gCa s^2 (ECa), gKC c chi and gAHP q (EK) to G and
//    to the current, after updating s (rational-form rates, words 29..38),
//    Ca' = Cinf + (Ca - Cinf) exp(-dec dt) with Cinf = kca ICa / dec (words
//    50, 51), c (rate alpha = e1 below the threshold of word 45, e2 above,
//    beta = e2 - alpha; e1, e2 exponential forms in words 39..44),
//    chi = min(Ca k1, 1) (word 46) and q (alpha = min(Ca k2, cap), words 47,
//    48; beta word 49). min and the threshold use the comparator: sel = CGT,
//    result = x + sel (y - x).
//  * syn_ucode: kinetic receptors dr/dt = alpha T (1 - r) - beta r, solved by
//    exponential Euler; T = Tmax while the time since the last accepted spike
//    is below Tdur; a spike is accepted only when that time exceeds the dead
//    time. g = gmax N r, i = g (V - E), summed over AMPA, NMDA, GABAa.
//  * hh_ucode: Hodgkin-Huxley soma with gates m, h, n; rates of form
//    s1 = (a (V - th) + a0) / (exp((V - th) binv) + c) and
//    s2 = a exp(b1 (V - th)); gates and voltage by exponential Euler; the
//    injected current is word 22 plus the stimulus wire ext_in[1].
//  * traub_ucode: soma of the reduced two-compartment Traub model: sodium
//    current gNa minf^2 h (V - ENa) with instantaneous activation
//    minf = am / (am + bm) (both rates of the rational form), delayed-rectifier
//    potassium gK n (V - EK); h and n and the voltage by exponential Euler.
//    Same word layout as hh_ucode except: 23 receives minf, 26..30 and 31..35
//    are the am and bm rational forms, 36..38 ah (exponential), 39..43 bh
//    (rational), 44..48 an (rational), 49..51 bn (exponential).
package np_ucode_pkg;
  import np_pkg::*;

  // hh_ucode: 136 micro-instructions, 57 variables
  function automatic np_instr_t hh_ucode(logic [7:0] pc);
    unique case (pc)
      8'd0: return mk(OP_LDP, 12, 0, 0, '0);  // V <= param[12]
      8'd1: return mk(OP_LDP, 13, 0, 1, '0);  // C <= param[13]
      8'd2: return mk(OP_LDP, 14, 0, 2, '0);  // dt <= param[14]
      8'd3: return mk(OP_LDP, 15, 0, 3, '0);  // gL <= param[15]
      8'd4: return mk(OP_LDP, 16, 0, 4, '0);  // EL <= param[16]
      8'd5: return mk(OP_LDP, 17, 0, 5, '0);  // gl <= param[17]
      8'd6: return mk(OP_LDP, 18, 0, 6, '0);  // ENa <= param[18]
      8'd7: return mk(OP_LDP, 19, 0, 7, '0);  // gNa <= param[19]
      8'd8: return mk(OP_LDP, 20, 0, 8, '0);  // EK <= param[20]
      8'd9: return mk(OP_LDP, 21, 0, 9, '0);  // gK <= param[21]
      8'd10: return mk(OP_LDP, 22, 0, 10, '0);  // Ie <= param[22]
      8'd11: return mk(OP_LDI, 0, 0, 11, 32'h00000000);  // zero <= 0.0
      8'd12: return mk(OP_LDX, 0, 0, 12, '0);  // Vd <= ext_in[0]
      8'd13: return mk(OP_LDI, 0, 0, 13, 32'h00000000);  // Ist <= 0.0
      8'd14: return mk(OP_LDP, 0, 0, 14, '0);  // cfg <= param[0]
      8'd15: return mk(OP_BRV, 14, 2, 0, 32'd17);  // if bit 2 of cfg is 0 goto nostim
      8'd16: return mk(OP_LDX, 1, 0, 13, '0);  // Ist <= ext_in[1]
      8'd17: return mk(OP_BRV, 14, 1, 0, 32'd19);  // if bit 1 of cfg is 0 goto dopen
      8'd18: return mk(OP_LDI, 0, 0, 5, 32'h00000000);  // gl <= 0.0
      8'd19: return mk(OP_LDP, 23, 0, 15, '0);  // m <= param[23]
      8'd20: return mk(OP_LDP, 26, 0, 16, '0);  // s1a <= param[26]
      8'd21: return mk(OP_LDP, 27, 0, 17, '0);  // s1a0 <= param[27]
      8'd22: return mk(OP_LDP, 28, 0, 18, '0);  // s1th <= param[28]
      8'd23: return mk(OP_LDP, 29, 0, 19, '0);  // s1binv <= param[29]
      8'd24: return mk(OP_LDP, 30, 0, 20, '0);  // s1c <= param[30]
      8'd25: return mk(OP_SUB, 0, 18, 21, '0);  // u <= V - s1th
      8'd26: return mk(OP_MUL, 16, 21, 22, '0);  // num <= s1a * u
      8'd27: return mk(OP_ADD, 22, 17, 22, '0);  // num <= num + s1a0
      8'd28: return mk(OP_MUL, 21, 19, 23, '0);  // w <= u * s1binv
      8'd29: return mk(OP_EXP, 23, 0, 23, '0);  // w <= exp(w)
      8'd30: return mk(OP_ADD, 23, 20, 23, '0);  // w <= w + s1c
      8'd31: return mk(OP_DIV, 22, 23, 24, '0);  // al <= num / w
      8'd32: return mk(OP_LDP, 31, 0, 25, '0);  // s2a <= param[31]
      8'd33: return mk(OP_LDP, 32, 0, 26, '0);  // s2b1 <= param[32]
      8'd34: return mk(OP_LDP, 33, 0, 27, '0);  // s2th <= param[33]
      8'd35: return mk(OP_SUB, 0, 27, 28, '0);  // u2 <= V - s2th
      8'd36: return mk(OP_MUL, 26, 28, 29, '0);  // w2 <= s2b1 * u2
      8'd37: return mk(OP_EXP, 29, 0, 29, '0);  // w2 <= exp(w2)
      8'd38: return mk(OP_MUL, 25, 29, 30, '0);  // be <= s2a * w2
      8'd39: return mk(OP_ADD, 24, 30, 31, '0);  // S <= al + be
      8'd40: return mk(OP_DIV, 24, 31, 32, '0);  // xinf <= al / S
      8'd41: return mk(OP_MUL, 31, 2, 33, '0);  // q <= S * dt
      8'd42: return mk(OP_SUB, 11, 33, 33, '0);  // q <= zero - q
      8'd43: return mk(OP_EXP, 33, 0, 34, '0);  // e <= exp(q)
      8'd44: return mk(OP_SUB, 15, 32, 35, '0);  // dx <= m - xinf
      8'd45: return mk(OP_MUL, 35, 34, 35, '0);  // dx <= dx * e
      8'd46: return mk(OP_ADD, 32, 35, 36, '0);  // mn <= xinf + dx
      8'd47: return mk(OP_STP, 36, 0, 23, '0);  // param[23] <= mn
      8'd48: return mk(OP_LDP, 24, 0, 37, '0);  // h <= param[24]
      8'd49: return mk(OP_LDP, 39, 0, 25, '0);  // s2a <= param[39]
      8'd50: return mk(OP_LDP, 40, 0, 26, '0);  // s2b1 <= param[40]
      8'd51: return mk(OP_LDP, 41, 0, 27, '0);  // s2th <= param[41]
      8'd52: return mk(OP_SUB, 0, 27, 28, '0);  // u2 <= V - s2th
      8'd53: return mk(OP_MUL, 26, 28, 29, '0);  // w2 <= s2b1 * u2
      8'd54: return mk(OP_EXP, 29, 0, 29, '0);  // w2 <= exp(w2)
      8'd55: return mk(OP_MUL, 25, 29, 24, '0);  // al <= s2a * w2
      8'd56: return mk(OP_LDP, 34, 0, 16, '0);  // s1a <= param[34]
      8'd57: return mk(OP_LDP, 35, 0, 17, '0);  // s1a0 <= param[35]
      8'd58: return mk(OP_LDP, 36, 0, 18, '0);  // s1th <= param[36]
      8'd59: return mk(OP_LDP, 37, 0, 19, '0);  // s1binv <= param[37]
      8'd60: return mk(OP_LDP, 38, 0, 20, '0);  // s1c <= param[38]
      8'd61: return mk(OP_SUB, 0, 18, 21, '0);  // u <= V - s1th
      8'd62: return mk(OP_MUL, 16, 21, 22, '0);  // num <= s1a * u
      8'd63: return mk(OP_ADD, 22, 17, 22, '0);  // num <= num + s1a0
      8'd64: return mk(OP_MUL, 21, 19, 23, '0);  // w <= u * s1binv
      8'd65: return mk(OP_EXP, 23, 0, 23, '0);  // w <= exp(w)
      8'd66: return mk(OP_ADD, 23, 20, 23, '0);  // w <= w + s1c
      8'd67: return mk(OP_DIV, 22, 23, 30, '0);  // be <= num / w
      8'd68: return mk(OP_ADD, 24, 30, 31, '0);  // S <= al + be
      8'd69: return mk(OP_DIV, 24, 31, 32, '0);  // xinf <= al / S
      8'd70: return mk(OP_MUL, 31, 2, 33, '0);  // q <= S * dt
      8'd71: return mk(OP_SUB, 11, 33, 33, '0);  // q <= zero - q
      8'd72: return mk(OP_EXP, 33, 0, 34, '0);  // e <= exp(q)
      8'd73: return mk(OP_SUB, 37, 32, 35, '0);  // dx <= h - xinf
      8'd74: return mk(OP_MUL, 35, 34, 35, '0);  // dx <= dx * e
      8'd75: return mk(OP_ADD, 32, 35, 38, '0);  // hn <= xinf + dx
      8'd76: return mk(OP_STP, 38, 0, 24, '0);  // param[24] <= hn
      8'd77: return mk(OP_LDP, 25, 0, 39, '0);  // n <= param[25]
      8'd78: return mk(OP_LDP, 42, 0, 16, '0);  // s1a <= param[42]
      8'd79: return mk(OP_LDP, 43, 0, 17, '0);  // s1a0 <= param[43]
      8'd80: return mk(OP_LDP, 44, 0, 18, '0);  // s1th <= param[44]
      8'd81: return mk(OP_LDP, 45, 0, 19, '0);  // s1binv <= param[45]
      8'd82: return mk(OP_LDP, 46, 0, 20, '0);  // s1c <= param[46]
      8'd83: return mk(OP_SUB, 0, 18, 21, '0);  // u <= V - s1th
      8'd84: return mk(OP_MUL, 16, 21, 22, '0);  // num <= s1a * u
      8'd85: return mk(OP_ADD, 22, 17, 22, '0);  // num <= num + s1a0
      8'd86: return mk(OP_MUL, 21, 19, 23, '0);  // w <= u * s1binv
      8'd87: return mk(OP_EXP, 23, 0, 23, '0);  // w <= exp(w)
      8'd88: return mk(OP_ADD, 23, 20, 23, '0);  // w <= w + s1c
      8'd89: return mk(OP_DIV, 22, 23, 24, '0);  // al <= num / w
      8'd90: return mk(OP_LDP, 47, 0, 25, '0);  // s2a <= param[47]
      8'd91: return mk(OP_LDP, 48, 0, 26, '0);  // s2b1 <= param[48]
      8'd92: return mk(OP_LDP, 49, 0, 27, '0);  // s2th <= param[49]
      8'd93: return mk(OP_SUB, 0, 27, 28, '0);  // u2 <= V - s2th
      8'd94: return mk(OP_MUL, 26, 28, 29, '0);  // w2 <= s2b1 * u2
      8'd95: return mk(OP_EXP, 29, 0, 29, '0);  // w2 <= exp(w2)
      8'd96: return mk(OP_MUL, 25, 29, 30, '0);  // be <= s2a * w2
      8'd97: return mk(OP_ADD, 24, 30, 31, '0);  // S <= al + be
      8'd98: return mk(OP_DIV, 24, 31, 32, '0);  // xinf <= al / S
      8'd99: return mk(OP_MUL, 31, 2, 33, '0);  // q <= S * dt
      8'd100: return mk(OP_SUB, 11, 33, 33, '0);  // q <= zero - q
      8'd101: return mk(OP_EXP, 33, 0, 34, '0);  // e <= exp(q)
      8'd102: return mk(OP_SUB, 39, 32, 35, '0);  // dx <= n - xinf
      8'd103: return mk(OP_MUL, 35, 34, 35, '0);  // dx <= dx * e
      8'd104: return mk(OP_ADD, 32, 35, 40, '0);  // nn <= xinf + dx
      8'd105: return mk(OP_STP, 40, 0, 25, '0);  // param[25] <= nn
      8'd106: return mk(OP_MUL, 36, 36, 41, '0);  // m2 <= mn * mn
      8'd107: return mk(OP_MUL, 41, 36, 42, '0);  // m3 <= m2 * mn
      8'd108: return mk(OP_MUL, 7, 42, 43, '0);  // gna <= gNa * m3
      8'd109: return mk(OP_MUL, 43, 38, 43, '0);  // gna <= gna * hn
      8'd110: return mk(OP_MUL, 40, 40, 44, '0);  // n2 <= nn * nn
      8'd111: return mk(OP_MUL, 44, 44, 45, '0);  // n4 <= n2 * n2
      8'd112: return mk(OP_MUL, 9, 45, 46, '0);  // gk <= gK * n4
      8'd113: return mk(OP_ADD, 43, 46, 47, '0);  // G <= gna + gk
      8'd114: return mk(OP_ADD, 47, 3, 47, '0);  // G <= G + gL
      8'd115: return mk(OP_ADD, 47, 5, 47, '0);  // G <= G + gl
      8'd116: return mk(OP_MUL, 43, 6, 48, '0);  // i1 <= gna * ENa
      8'd117: return mk(OP_MUL, 46, 8, 49, '0);  // i2 <= gk * EK
      8'd118: return mk(OP_MUL, 3, 4, 50, '0);  // i3 <= gL * EL
      8'd119: return mk(OP_MUL, 5, 12, 51, '0);  // i4 <= gl * Vd
      8'd120: return mk(OP_ADD, 48, 49, 52, '0);  // I <= i1 + i2
      8'd121: return mk(OP_ADD, 52, 50, 52, '0);  // I <= I + i3
      8'd122: return mk(OP_ADD, 52, 51, 52, '0);  // I <= I + i4
      8'd123: return mk(OP_ADD, 52, 10, 52, '0);  // I <= I + Ie
      8'd124: return mk(OP_ADD, 52, 13, 52, '0);  // I <= I + Ist
      8'd125: return mk(OP_DIV, 52, 47, 53, '0);  // Vinf <= I / G
      8'd126: return mk(OP_MUL, 47, 2, 54, '0);  // k <= G * dt
      8'd127: return mk(OP_DIV, 54, 1, 54, '0);  // k <= k / C
      8'd128: return mk(OP_SUB, 11, 54, 54, '0);  // k <= zero - k
      8'd129: return mk(OP_EXP, 54, 0, 34, '0);  // e <= exp(k)
      8'd130: return mk(OP_SUB, 0, 53, 55, '0);  // dv <= V - Vinf
      8'd131: return mk(OP_MUL, 55, 34, 55, '0);  // dv <= dv * e
      8'd132: return mk(OP_ADD, 53, 55, 56, '0);  // Vn <= Vinf + dv
      8'd133: return mk(OP_STP, 56, 0, 12, '0);  // param[12] <= Vn
      8'd134: return mk(OP_STX, 56, 0, 0, '0);  // ext_out[0] <= Vn
      8'd135: return mk(OP_END, 0, 0, 0, '0);  // end of cell
      default: return mk(OP_END, 0, 0, 0);
    endcase
  endfunction

  // traub_ucode: 131 micro-instructions, 53 variables
  function automatic np_instr_t traub_ucode(logic [7:0] pc);
    unique case (pc)
      8'd0: return mk(OP_LDP, 12, 0, 0, '0);  // V <= param[12]
      8'd1: return mk(OP_LDP, 13, 0, 1, '0);  // C <= param[13]
      8'd2: return mk(OP_LDP, 14, 0, 2, '0);  // dt <= param[14]
      8'd3: return mk(OP_LDP, 15, 0, 3, '0);  // gL <= param[15]
      8'd4: return mk(OP_LDP, 16, 0, 4, '0);  // EL <= param[16]
      8'd5: return mk(OP_LDP, 17, 0, 5, '0);  // gl <= param[17]
      8'd6: return mk(OP_LDP, 18, 0, 6, '0);  // ENa <= param[18]
      8'd7: return mk(OP_LDP, 19, 0, 7, '0);  // gNa <= param[19]
      8'd8: return mk(OP_LDP, 20, 0, 8, '0);  // EK <= param[20]
      8'd9: return mk(OP_LDP, 21, 0, 9, '0);  // gK <= param[21]
      8'd10: return mk(OP_LDP, 22, 0, 10, '0);  // Ie <= param[22]
      8'd11: return mk(OP_LDI, 0, 0, 11, 32'h00000000);  // zero <= 0.0
      8'd12: return mk(OP_LDX, 0, 0, 12, '0);  // Vd <= ext_in[0]
      8'd13: return mk(OP_LDI, 0, 0, 13, 32'h00000000);  // Ist <= 0.0
      8'd14: return mk(OP_LDP, 0, 0, 14, '0);  // cfg <= param[0]
      8'd15: return mk(OP_BRV, 14, 2, 0, 32'd17);  // if bit 2 of cfg is 0 goto nostim
      8'd16: return mk(OP_LDX, 1, 0, 13, '0);  // Ist <= ext_in[1]
      8'd17: return mk(OP_BRV, 14, 1, 0, 32'd19);  // if bit 1 of cfg is 0 goto dopen
      8'd18: return mk(OP_LDI, 0, 0, 5, 32'h00000000);  // gl <= 0.0
      8'd19: return mk(OP_LDP, 26, 0, 15, '0);  // s1a <= param[26]
      8'd20: return mk(OP_LDP, 27, 0, 16, '0);  // s1a0 <= param[27]
      8'd21: return mk(OP_LDP, 28, 0, 17, '0);  // s1th <= param[28]
      8'd22: return mk(OP_LDP, 29, 0, 18, '0);  // s1binv <= param[29]
      8'd23: return mk(OP_LDP, 30, 0, 19, '0);  // s1c <= param[30]
      8'd24: return mk(OP_SUB, 0, 17, 20, '0);  // u <= V - s1th
      8'd25: return mk(OP_MUL, 15, 20, 21, '0);  // num <= s1a * u
      8'd26: return mk(OP_ADD, 21, 16, 21, '0);  // num <= num + s1a0
      8'd27: return mk(OP_MUL, 20, 18, 22, '0);  // w <= u * s1binv
      8'd28: return mk(OP_EXP, 22, 0, 22, '0);  // w <= exp(w)
      8'd29: return mk(OP_ADD, 22, 19, 22, '0);  // w <= w + s1c
      8'd30: return mk(OP_DIV, 21, 22, 23, '0);  // al <= num / w
      8'd31: return mk(OP_LDP, 31, 0, 15, '0);  // s1a <= param[31]
      8'd32: return mk(OP_LDP, 32, 0, 16, '0);  // s1a0 <= param[32]
      8'd33: return mk(OP_LDP, 33, 0, 17, '0);  // s1th <= param[33]
      8'd34: return mk(OP_LDP, 34, 0, 18, '0);  // s1binv <= param[34]
      8'd35: return mk(OP_LDP, 35, 0, 19, '0);  // s1c <= param[35]
      8'd36: return mk(OP_SUB, 0, 17, 20, '0);  // u <= V - s1th
      8'd37: return mk(OP_MUL, 15, 20, 21, '0);  // num <= s1a * u
      8'd38: return mk(OP_ADD, 21, 16, 21, '0);  // num <= num + s1a0
      8'd39: return mk(OP_MUL, 20, 18, 22, '0);  // w <= u * s1binv
      8'd40: return mk(OP_EXP, 22, 0, 22, '0);  // w <= exp(w)
      8'd41: return mk(OP_ADD, 22, 19, 22, '0);  // w <= w + s1c
      8'd42: return mk(OP_DIV, 21, 22, 24, '0);  // be <= num / w
      8'd43: return mk(OP_ADD, 23, 24, 25, '0);  // S <= al + be
      8'd44: return mk(OP_DIV, 23, 25, 26, '0);  // minf <= al / S
      8'd45: return mk(OP_STP, 26, 0, 23, '0);  // param[23] <= minf
      8'd46: return mk(OP_LDP, 24, 0, 27, '0);  // h <= param[24]
      8'd47: return mk(OP_LDP, 36, 0, 28, '0);  // s2a <= param[36]
      8'd48: return mk(OP_LDP, 37, 0, 29, '0);  // s2b1 <= param[37]
      8'd49: return mk(OP_LDP, 38, 0, 30, '0);  // s2th <= param[38]
      8'd50: return mk(OP_SUB, 0, 30, 31, '0);  // u2 <= V - s2th
      8'd51: return mk(OP_MUL, 29, 31, 32, '0);  // w2 <= s2b1 * u2
      8'd52: return mk(OP_EXP, 32, 0, 32, '0);  // w2 <= exp(w2)
      8'd53: return mk(OP_MUL, 28, 32, 23, '0);  // al <= s2a * w2
      8'd54: return mk(OP_LDP, 39, 0, 15, '0);  // s1a <= param[39]
      8'd55: return mk(OP_LDP, 40, 0, 16, '0);  // s1a0 <= param[40]
      8'd56: return mk(OP_LDP, 41, 0, 17, '0);  // s1th <= param[41]
      8'd57: return mk(OP_LDP, 42, 0, 18, '0);  // s1binv <= param[42]
      8'd58: return mk(OP_LDP, 43, 0, 19, '0);  // s1c <= param[43]
      8'd59: return mk(OP_SUB, 0, 17, 20, '0);  // u <= V - s1th
      8'd60: return mk(OP_MUL, 15, 20, 21, '0);  // num <= s1a * u
      8'd61: return mk(OP_ADD, 21, 16, 21, '0);  // num <= num + s1a0
      8'd62: return mk(OP_MUL, 20, 18, 22, '0);  // w <= u * s1binv
      8'd63: return mk(OP_EXP, 22, 0, 22, '0);  // w <= exp(w)
      8'd64: return mk(OP_ADD, 22, 19, 22, '0);  // w <= w + s1c
      8'd65: return mk(OP_DIV, 21, 22, 24, '0);  // be <= num / w
      8'd66: return mk(OP_ADD, 23, 24, 25, '0);  // S <= al + be
      8'd67: return mk(OP_DIV, 23, 25, 33, '0);  // xinf <= al / S
      8'd68: return mk(OP_MUL, 25, 2, 34, '0);  // q <= S * dt
      8'd69: return mk(OP_SUB, 11, 34, 34, '0);  // q <= zero - q
      8'd70: return mk(OP_EXP, 34, 0, 35, '0);  // e <= exp(q)
      8'd71: return mk(OP_SUB, 27, 33, 36, '0);  // dx <= h - xinf
      8'd72: return mk(OP_MUL, 36, 35, 36, '0);  // dx <= dx * e
      8'd73: return mk(OP_ADD, 33, 36, 37, '0);  // hn <= xinf + dx
      8'd74: return mk(OP_STP, 37, 0, 24, '0);  // param[24] <= hn
      8'd75: return mk(OP_LDP, 25, 0, 38, '0);  // n <= param[25]
      8'd76: return mk(OP_LDP, 44, 0, 15, '0);  // s1a <= param[44]
      8'd77: return mk(OP_LDP, 45, 0, 16, '0);  // s1a0 <= param[45]
      8'd78: return mk(OP_LDP, 46, 0, 17, '0);  // s1th <= param[46]
      8'd79: return mk(OP_LDP, 47, 0, 18, '0);  // s1binv <= param[47]
      8'd80: return mk(OP_LDP, 48, 0, 19, '0);  // s1c <= param[48]
      8'd81: return mk(OP_SUB, 0, 17, 20, '0);  // u <= V - s1th
      8'd82: return mk(OP_MUL, 15, 20, 21, '0);  // num <= s1a * u
      8'd83: return mk(OP_ADD, 21, 16, 21, '0);  // num <= num + s1a0
      8'd84: return mk(OP_MUL, 20, 18, 22, '0);  // w <= u * s1binv
      8'd85: return mk(OP_EXP, 22, 0, 22, '0);  // w <= exp(w)
      8'd86: return mk(OP_ADD, 22, 19, 22, '0);  // w <= w + s1c
      8'd87: return mk(OP_DIV, 21, 22, 23, '0);  // al <= num / w
      8'd88: return mk(OP_LDP, 49, 0, 28, '0);  // s2a <= param[49]
      8'd89: return mk(OP_LDP, 50, 0, 29, '0);  // s2b1 <= param[50]
      8'd90: return mk(OP_LDP, 51, 0, 30, '0);  // s2th <= param[51]
      8'd91: return mk(OP_SUB, 0, 30, 31, '0);  // u2 <= V - s2th
      8'd92: return mk(OP_MUL, 29, 31, 32, '0);  // w2 <= s2b1 * u2
      8'd93: return mk(OP_EXP, 32, 0, 32, '0);  // w2 <= exp(w2)
      8'd94: return mk(OP_MUL, 28, 32, 24, '0);  // be <= s2a * w2
      8'd95: return mk(OP_ADD, 23, 24, 25, '0);  // S <= al + be
      8'd96: return mk(OP_DIV, 23, 25, 33, '0);  // xinf <= al / S
      8'd97: return mk(OP_MUL, 25, 2, 34, '0);  // q <= S * dt
      8'd98: return mk(OP_SUB, 11, 34, 34, '0);  // q <= zero - q
      8'd99: return mk(OP_EXP, 34, 0, 35, '0);  // e <= exp(q)
      8'd100: return mk(OP_SUB, 38, 33, 36, '0);  // dx <= n - xinf
      8'd101: return mk(OP_MUL, 36, 35, 36, '0);  // dx <= dx * e
      8'd102: return mk(OP_ADD, 33, 36, 39, '0);  // nn <= xinf + dx
      8'd103: return mk(OP_STP, 39, 0, 25, '0);  // param[25] <= nn
      8'd104: return mk(OP_MUL, 26, 26, 40, '0);  // m2 <= minf * minf
      8'd105: return mk(OP_MUL, 7, 40, 41, '0);  // gna <= gNa * m2
      8'd106: return mk(OP_MUL, 41, 37, 41, '0);  // gna <= gna * hn
      8'd107: return mk(OP_MUL, 9, 39, 42, '0);  // gk <= gK * nn
      8'd108: return mk(OP_ADD, 41, 42, 43, '0);  // G <= gna + gk
      8'd109: return mk(OP_ADD, 43, 3, 43, '0);  // G <= G + gL
      8'd110: return mk(OP_ADD, 43, 5, 43, '0);  // G <= G + gl
      8'd111: return mk(OP_MUL, 41, 6, 44, '0);  // i1 <= gna * ENa
      8'd112: return mk(OP_MUL, 42, 8, 45, '0);  // i2 <= gk * EK
      8'd113: return mk(OP_MUL, 3, 4, 46, '0);  // i3 <= gL * EL
      8'd114: return mk(OP_MUL, 5, 12, 47, '0);  // i4 <= gl * Vd
      8'd115: return mk(OP_ADD, 44, 45, 48, '0);  // I <= i1 + i2
      8'd116: return mk(OP_ADD, 48, 46, 48, '0);  // I <= I + i3
      8'd117: return mk(OP_ADD, 48, 47, 48, '0);  // I <= I + i4
      8'd118: return mk(OP_ADD, 48, 10, 48, '0);  // I <= I + Ie
      8'd119: return mk(OP_ADD, 48, 13, 48, '0);  // I <= I + Ist
      8'd120: return mk(OP_DIV, 48, 43, 49, '0);  // Vinf <= I / G
      8'd121: return mk(OP_MUL, 43, 2, 50, '0);  // k <= G * dt
      8'd122: return mk(OP_DIV, 50, 1, 50, '0);  // k <= k / C
      8'd123: return mk(OP_SUB, 11, 50, 50, '0);  // k <= zero - k
      8'd124: return mk(OP_EXP, 50, 0, 35, '0);  // e <= exp(k)
      8'd125: return mk(OP_SUB, 0, 49, 51, '0);  // dv <= V - Vinf
      8'd126: return mk(OP_MUL, 51, 35, 51, '0);  // dv <= dv * e
      8'd127: return mk(OP_ADD, 49, 51, 52, '0);  // Vn <= Vinf + dv
      8'd128: return mk(OP_STP, 52, 0, 12, '0);  // param[12] <= Vn
      8'd129: return mk(OP_STX, 52, 0, 0, '0);  // ext_out[0] <= Vn
      8'd130: return mk(OP_END, 0, 0, 0, '0);  // end of cell
      default: return mk(OP_END, 0, 0, 0);
    endcase
  endfunction

  // dend_ucode: 172 micro-instructions, 58 variables
  function automatic np_instr_t dend_ucode(logic [7:0] pc);
    unique case (pc)
      8'd0: return mk(OP_LDP, 12, 0, 0, '0);  // V <= param[12]
      8'd1: return mk(OP_LDP, 13, 0, 1, '0);  // C <= param[13]
      8'd2: return mk(OP_LDP, 14, 0, 2, '0);  // dt <= param[14]
      8'd3: return mk(OP_LDP, 15, 0, 3, '0);  // gL <= param[15]
      8'd4: return mk(OP_LDP, 16, 0, 4, '0);  // EL <= param[16]
      8'd5: return mk(OP_LDP, 17, 0, 5, '0);  // gl <= param[17]
      8'd6: return mk(OP_LDP, 18, 0, 6, '0);  // gr <= param[18]
      8'd7: return mk(OP_LDP, 19, 0, 7, '0);  // Ie <= param[19]
      8'd8: return mk(OP_LDX, 0, 0, 8, '0);  // Vl <= ext_in[0]
      8'd9: return mk(OP_LDX, 1, 0, 9, '0);  // Vr <= ext_in[1]
      8'd10: return mk(OP_LDX, 3, 0, 10, '0);  // isyn <= ext_in[3]
      8'd11: return mk(OP_LDI, 0, 0, 11, 32'h00000000);  // zero <= 0.0
      8'd12: return mk(OP_LDP, 0, 0, 12, '0);  // cfg <= param[0]
      8'd13: return mk(OP_BRV, 12, 0, 0, 32'd15);  // if bit 0 of cfg is 0 goto lopen
      8'd14: return mk(OP_LDI, 0, 0, 5, 32'h00000000);  // gl <= 0.0
      8'd15: return mk(OP_BRV, 12, 1, 0, 32'd17);  // if bit 1 of cfg is 0 goto ropen
      8'd16: return mk(OP_LDI, 0, 0, 6, 32'h00000000);  // gr <= 0.0
      8'd17: return mk(OP_MUL, 3, 4, 13, '0);  // t1 <= gL * EL
      8'd18: return mk(OP_MUL, 5, 8, 14, '0);  // t2 <= gl * Vl
      8'd19: return mk(OP_MUL, 6, 9, 15, '0);  // t3 <= gr * Vr
      8'd20: return mk(OP_ADD, 3, 5, 16, '0);  // G <= gL + gl
      8'd21: return mk(OP_ADD, 16, 6, 16, '0);  // G <= G + gr
      8'd22: return mk(OP_ADD, 7, 13, 17, '0);  // I0 <= Ie + t1
      8'd23: return mk(OP_SUB, 17, 10, 17, '0);  // I0 <= I0 - isyn
      8'd24: return mk(OP_BRC, 3, 0, 0, 32'd146);  // passive compartment: skip the calcium channels
      8'd25: return mk(OP_LDI, 0, 0, 18, 32'h3F800000);  // one <= 1.0
      8'd26: return mk(OP_LDP, 29, 0, 19, '0);  // ra <= param[29]
      8'd27: return mk(OP_LDP, 30, 0, 20, '0);  // ra0 <= param[30]
      8'd28: return mk(OP_LDP, 31, 0, 21, '0);  // rth <= param[31]
      8'd29: return mk(OP_LDP, 32, 0, 22, '0);  // rbinv <= param[32]
      8'd30: return mk(OP_LDP, 33, 0, 23, '0);  // rc <= param[33]
      8'd31: return mk(OP_SUB, 0, 21, 24, '0);  // u <= V - rth
      8'd32: return mk(OP_MUL, 19, 24, 25, '0);  // num <= ra * u
      8'd33: return mk(OP_ADD, 25, 20, 25, '0);  // num <= num + ra0
      8'd34: return mk(OP_MUL, 24, 22, 26, '0);  // w <= u * rbinv
      8'd35: return mk(OP_EXP, 26, 0, 26, '0);  // w <= exp(w)
      8'd36: return mk(OP_ADD, 26, 23, 26, '0);  // w <= w + rc
      8'd37: return mk(OP_DIV, 25, 26, 27, '0);  // al <= num / w
      8'd38: return mk(OP_LDP, 34, 0, 19, '0);  // ra <= param[34]
      8'd39: return mk(OP_LDP, 35, 0, 20, '0);  // ra0 <= param[35]
      8'd40: return mk(OP_LDP, 36, 0, 21, '0);  // rth <= param[36]
      8'd41: return mk(OP_LDP, 37, 0, 22, '0);  // rbinv <= param[37]
      8'd42: return mk(OP_LDP, 38, 0, 23, '0);  // rc <= param[38]
      8'd43: return mk(OP_SUB, 0, 21, 24, '0);  // u <= V - rth
      8'd44: return mk(OP_MUL, 19, 24, 25, '0);  // num <= ra * u
      8'd45: return mk(OP_ADD, 25, 20, 25, '0);  // num <= num + ra0
      8'd46: return mk(OP_MUL, 24, 22, 26, '0);  // w <= u * rbinv
      8'd47: return mk(OP_EXP, 26, 0, 26, '0);  // w <= exp(w)
      8'd48: return mk(OP_ADD, 26, 23, 26, '0);  // w <= w + rc
      8'd49: return mk(OP_DIV, 25, 26, 28, '0);  // be <= num / w
      8'd50: return mk(OP_LDP, 20, 0, 29, '0);  // s <= param[20]
      8'd51: return mk(OP_ADD, 27, 28, 30, '0);  // S <= al + be
      8'd52: return mk(OP_DIV, 27, 30, 31, '0);  // xinf <= al / S
      8'd53: return mk(OP_MUL, 30, 2, 32, '0);  // q <= S * dt
      8'd54: return mk(OP_SUB, 11, 32, 32, '0);  // q <= zero - q
      8'd55: return mk(OP_EXP, 32, 0, 33, '0);  // e <= exp(q)
      8'd56: return mk(OP_SUB, 29, 31, 34, '0);  // dx <= s - xinf
      8'd57: return mk(OP_MUL, 34, 33, 34, '0);  // dx <= dx * e
      8'd58: return mk(OP_ADD, 31, 34, 29, '0);  // s <= xinf + dx
      8'd59: return mk(OP_STP, 29, 0, 20, '0);  // param[20] <= s
      8'd60: return mk(OP_LDP, 24, 0, 35, '0);  // k1 <= param[24]
      8'd61: return mk(OP_LDP, 25, 0, 36, '0);  // ECa <= param[25]
      8'd62: return mk(OP_MUL, 29, 29, 37, '0);  // gca <= s * s
      8'd63: return mk(OP_MUL, 37, 35, 37, '0);  // gca <= gca * k1
      8'd64: return mk(OP_SUB, 0, 36, 24, '0);  // u <= V - ECa
      8'd65: return mk(OP_MUL, 37, 24, 38, '0);  // ica <= gca * u
      8'd66: return mk(OP_LDP, 23, 0, 39, '0);  // Ca <= param[23]
      8'd67: return mk(OP_LDP, 50, 0, 35, '0);  // k1 <= param[50]
      8'd68: return mk(OP_LDP, 51, 0, 40, '0);  // k2 <= param[51]
      8'd69: return mk(OP_MUL, 35, 38, 31, '0);  // xinf <= k1 * ica
      8'd70: return mk(OP_DIV, 31, 40, 31, '0);  // xinf <= xinf / k2
      8'd71: return mk(OP_MUL, 40, 2, 32, '0);  // q <= k2 * dt
      8'd72: return mk(OP_SUB, 11, 32, 32, '0);  // q <= zero - q
      8'd73: return mk(OP_EXP, 32, 0, 33, '0);  // e <= exp(q)
      8'd74: return mk(OP_SUB, 39, 31, 34, '0);  // dx <= Ca - xinf
      8'd75: return mk(OP_MUL, 34, 33, 34, '0);  // dx <= dx * e
      8'd76: return mk(OP_ADD, 31, 34, 39, '0);  // Ca <= xinf + dx
      8'd77: return mk(OP_STP, 39, 0, 23, '0);  // param[23] <= Ca
      8'd78: return mk(OP_LDP, 39, 0, 19, '0);  // ra <= param[39]
      8'd79: return mk(OP_LDP, 40, 0, 41, '0);  // rb1 <= param[40]
      8'd80: return mk(OP_LDP, 41, 0, 21, '0);  // rth <= param[41]
      8'd81: return mk(OP_SUB, 0, 21, 24, '0);  // u <= V - rth
      8'd82: return mk(OP_MUL, 41, 24, 26, '0);  // w <= rb1 * u
      8'd83: return mk(OP_EXP, 26, 0, 26, '0);  // w <= exp(w)
      8'd84: return mk(OP_MUL, 19, 26, 25, '0);  // num <= ra * w
      8'd85: return mk(OP_LDP, 42, 0, 19, '0);  // ra <= param[42]
      8'd86: return mk(OP_LDP, 43, 0, 41, '0);  // rb1 <= param[43]
      8'd87: return mk(OP_LDP, 44, 0, 21, '0);  // rth <= param[44]
      8'd88: return mk(OP_SUB, 0, 21, 24, '0);  // u <= V - rth
      8'd89: return mk(OP_MUL, 41, 24, 26, '0);  // w <= rb1 * u
      8'd90: return mk(OP_EXP, 26, 0, 26, '0);  // w <= exp(w)
      8'd91: return mk(OP_MUL, 19, 26, 30, '0);  // S <= ra * w
      8'd92: return mk(OP_LDP, 45, 0, 35, '0);  // k1 <= param[45]
      8'd93: return mk(OP_CGT, 0, 35, 42, '0);  // sel <= (V > k1) ? 1 : 0
      8'd94: return mk(OP_SUB, 30, 25, 34, '0);  // dx <= S - num
      8'd95: return mk(OP_MUL, 34, 42, 34, '0);  // dx <= dx * sel
      8'd96: return mk(OP_ADD, 25, 34, 27, '0);  // al <= num + dx
      8'd97: return mk(OP_SUB, 30, 27, 28, '0);  // be <= S - al
      8'd98: return mk(OP_LDP, 21, 0, 43, '0);  // c <= param[21]
      8'd99: return mk(OP_ADD, 27, 28, 30, '0);  // S <= al + be
      8'd100: return mk(OP_DIV, 27, 30, 31, '0);  // xinf <= al / S
      8'd101: return mk(OP_MUL, 30, 2, 32, '0);  // q <= S * dt
      8'd102: return mk(OP_SUB, 11, 32, 32, '0);  // q <= zero - q
      8'd103: return mk(OP_EXP, 32, 0, 33, '0);  // e <= exp(q)
      8'd104: return mk(OP_SUB, 43, 31, 34, '0);  // dx <= c - xinf
      8'd105: return mk(OP_MUL, 34, 33, 34, '0);  // dx <= dx * e
      8'd106: return mk(OP_ADD, 31, 34, 43, '0);  // c <= xinf + dx
      8'd107: return mk(OP_STP, 43, 0, 21, '0);  // param[21] <= c
      8'd108: return mk(OP_LDP, 46, 0, 35, '0);  // k1 <= param[46]
      8'd109: return mk(OP_MUL, 39, 35, 44, '0);  // chi <= Ca * k1
      8'd110: return mk(OP_CGT, 44, 18, 42, '0);  // sel <= (chi > one) ? 1 : 0
      8'd111: return mk(OP_SUB, 18, 44, 34, '0);  // dx <= one - chi
      8'd112: return mk(OP_MUL, 34, 42, 34, '0);  // dx <= dx * sel
      8'd113: return mk(OP_ADD, 44, 34, 44, '0);  // chi <= chi + dx
      8'd114: return mk(OP_LDP, 47, 0, 35, '0);  // k1 <= param[47]
      8'd115: return mk(OP_LDP, 48, 0, 40, '0);  // k2 <= param[48]
      8'd116: return mk(OP_MUL, 39, 35, 27, '0);  // al <= Ca * k1
      8'd117: return mk(OP_CGT, 27, 40, 42, '0);  // sel <= (al > k2) ? 1 : 0
      8'd118: return mk(OP_SUB, 40, 27, 34, '0);  // dx <= k2 - al
      8'd119: return mk(OP_MUL, 34, 42, 34, '0);  // dx <= dx * sel
      8'd120: return mk(OP_ADD, 27, 34, 27, '0);  // al <= al + dx
      8'd121: return mk(OP_LDP, 49, 0, 28, '0);  // be <= param[49]
      8'd122: return mk(OP_LDP, 22, 0, 45, '0);  // qa <= param[22]
      8'd123: return mk(OP_ADD, 27, 28, 30, '0);  // S <= al + be
      8'd124: return mk(OP_DIV, 27, 30, 31, '0);  // xinf <= al / S
      8'd125: return mk(OP_MUL, 30, 2, 32, '0);  // q <= S * dt
      8'd126: return mk(OP_SUB, 11, 32, 32, '0);  // q <= zero - q
      8'd127: return mk(OP_EXP, 32, 0, 33, '0);  // e <= exp(q)
      8'd128: return mk(OP_SUB, 45, 31, 34, '0);  // dx <= qa - xinf
      8'd129: return mk(OP_MUL, 34, 33, 34, '0);  // dx <= dx * e
      8'd130: return mk(OP_ADD, 31, 34, 45, '0);  // qa <= xinf + dx
      8'd131: return mk(OP_STP, 45, 0, 22, '0);  // param[22] <= qa
      8'd132: return mk(OP_LDP, 26, 0, 35, '0);  // k1 <= param[26]
      8'd133: return mk(OP_LDP, 27, 0, 40, '0);  // k2 <= param[27]
      8'd134: return mk(OP_LDP, 28, 0, 46, '0);  // EK <= param[28]
      8'd135: return mk(OP_MUL, 35, 43, 47, '0);  // gk <= k1 * c
      8'd136: return mk(OP_MUL, 47, 44, 47, '0);  // gk <= gk * chi
      8'd137: return mk(OP_MUL, 40, 45, 24, '0);  // u <= k2 * qa
      8'd138: return mk(OP_ADD, 47, 24, 47, '0);  // gk <= gk + u
      8'd139: return mk(OP_ADD, 16, 37, 16, '0);  // G <= G + gca
      8'd140: return mk(OP_ADD, 16, 47, 16, '0);  // G <= G + gk
      8'd141: return mk(OP_MUL, 37, 36, 24, '0);  // u <= gca * ECa
      8'd142: return mk(OP_ADD, 17, 24, 17, '0);  // I0 <= I0 + u
      8'd143: return mk(OP_MUL, 47, 46, 24, '0);  // u <= gk * EK
      8'd144: return mk(OP_ADD, 17, 24, 17, '0);  // I0 <= I0 + u
      8'd145: return mk(OP_STP, 38, 0, 52, '0);  // param[52] <= ica
      8'd146: return mk(OP_ADD, 17, 14, 48, '0);  // I <= I0 + t2
      8'd147: return mk(OP_ADD, 48, 15, 48, '0);  // I <= I + t3
      8'd148: return mk(OP_BRC, 2, 1, 0, 32'd160);  // backward Euler selected?
      8'd149: return mk(OP_DIV, 48, 16, 49, '0);  // Vinf <= I / G
      8'd150: return mk(OP_MUL, 16, 2, 50, '0);  // k <= G * dt
      8'd151: return mk(OP_DIV, 50, 1, 50, '0);  // k <= k / C
      8'd152: return mk(OP_SUB, 11, 50, 50, '0);  // k <= zero - k
      8'd153: return mk(OP_EXP, 50, 0, 33, '0);  // e <= exp(k)
      8'd154: return mk(OP_SUB, 0, 49, 51, '0);  // dv <= V - Vinf
      8'd155: return mk(OP_MUL, 51, 33, 51, '0);  // dv <= dv * e
      8'd156: return mk(OP_ADD, 49, 51, 52, '0);  // Vn <= Vinf + dv
      8'd157: return mk(OP_STP, 52, 0, 12, '0);  // param[12] <= Vn
      8'd158: return mk(OP_STX, 52, 0, 0, '0);  // ext_out[0] <= Vn
      8'd159: return mk(OP_END, 0, 0, 0, '0);  // end of cell
      8'd160: return mk(OP_DIV, 1, 2, 53, '0);  // cdt <= C / dt
      8'd161: return mk(OP_ADD, 53, 16, 54, '0);  // cb <= cdt + G
      8'd162: return mk(OP_SUB, 11, 5, 55, '0);  // ca <= zero - gl
      8'd163: return mk(OP_SUB, 11, 6, 56, '0);  // cc <= zero - gr
      8'd164: return mk(OP_MUL, 53, 0, 57, '0);  // cd <= cdt * V
      8'd165: return mk(OP_ADD, 57, 17, 57, '0);  // cd <= cd + I0
      8'd166: return mk(OP_STP, 55, 0, 8, '0);  // param[8] <= ca
      8'd167: return mk(OP_STP, 54, 0, 9, '0);  // param[9] <= cb
      8'd168: return mk(OP_STP, 56, 0, 10, '0);  // param[10] <= cc
      8'd169: return mk(OP_STP, 57, 0, 11, '0);  // param[11] <= cd
      8'd170: return mk(OP_STX, 0, 0, 0, '0);  // ext_out[0] <= V
      8'd171: return mk(OP_END, 0, 0, 0, '0);  // end of cell
      default: return mk(OP_END, 0, 0, 0);
    endcase
  endfunction

  // syn_ucode: 91 micro-instructions, 61 variables
  function automatic np_instr_t syn_ucode(logic [7:0] pc);
    unique case (pc)
      8'd0: return mk(OP_LDP, 12, 0, 0, '0);  // ts <= param[12]
      8'd1: return mk(OP_LDP, 13, 0, 1, '0);  // dt <= param[13]
      8'd2: return mk(OP_LDP, 14, 0, 2, '0);  // Tmax <= param[14]
      8'd3: return mk(OP_LDP, 15, 0, 3, '0);  // Tdur <= param[15]
      8'd4: return mk(OP_LDP, 16, 0, 4, '0);  // dead <= param[16]
      8'd5: return mk(OP_LDX, 0, 0, 5, '0);  // V <= ext_in[0]
      8'd6: return mk(OP_LDX, 1, 0, 6, '0);  // sp <= ext_in[1]
      8'd7: return mk(OP_LDI, 0, 0, 7, 32'h3F800000);  // one <= 1.0
      8'd8: return mk(OP_LDI, 0, 0, 8, 32'h00000000);  // zero <= 0.0
      8'd9: return mk(OP_LDI, 0, 0, 9, 32'h00000000);  // gs <= 0.0
      8'd10: return mk(OP_LDI, 0, 0, 10, 32'h00000000);  // is <= 0.0
      8'd11: return mk(OP_ADD, 0, 1, 0, '0);  // ts <= ts + dt
      8'd12: return mk(OP_CGT, 0, 4, 11, '0);  // ok <= (ts > dead) ? 1 : 0
      8'd13: return mk(OP_MUL, 6, 11, 12, '0);  // acc <= sp * ok
      8'd14: return mk(OP_SUB, 7, 12, 13, '0);  // nacc <= one - acc
      8'd15: return mk(OP_MUL, 0, 13, 0, '0);  // ts <= ts * nacc
      8'd16: return mk(OP_CGT, 3, 0, 14, '0);  // on <= (Tdur > ts) ? 1 : 0
      8'd17: return mk(OP_MUL, 2, 14, 15, '0);  // T <= Tmax * on
      8'd18: return mk(OP_STP, 0, 0, 12, '0);  // param[12] <= ts
      8'd19: return mk(OP_LDP, 20, 0, 16, '0);  // al_ampa <= param[20]
      8'd20: return mk(OP_LDP, 21, 0, 17, '0);  // be_ampa <= param[21]
      8'd21: return mk(OP_LDP, 22, 0, 18, '0);  // gm_ampa <= param[22]
      8'd22: return mk(OP_LDP, 23, 0, 19, '0);  // N_ampa <= param[23]
      8'd23: return mk(OP_LDP, 24, 0, 20, '0);  // E_ampa <= param[24]
      8'd24: return mk(OP_LDP, 25, 0, 21, '0);  // r_ampa <= param[25]
      8'd25: return mk(OP_MUL, 16, 15, 22, '0);  // aT_ampa <= al_ampa * T
      8'd26: return mk(OP_ADD, 22, 17, 23, '0);  // s_ampa <= aT_ampa + be_ampa
      8'd27: return mk(OP_DIV, 22, 23, 24, '0);  // rinf_ampa <= aT_ampa / s_ampa
      8'd28: return mk(OP_MUL, 23, 1, 25, '0);  // q_ampa <= s_ampa * dt
      8'd29: return mk(OP_SUB, 8, 25, 25, '0);  // q_ampa <= zero - q_ampa
      8'd30: return mk(OP_EXP, 25, 0, 26, '0);  // e_ampa <= exp(q_ampa)
      8'd31: return mk(OP_SUB, 21, 24, 27, '0);  // dr_ampa <= r_ampa - rinf_ampa
      8'd32: return mk(OP_MUL, 27, 26, 27, '0);  // dr_ampa <= dr_ampa * e_ampa
      8'd33: return mk(OP_ADD, 24, 27, 21, '0);  // r_ampa <= rinf_ampa + dr_ampa
      8'd34: return mk(OP_STP, 21, 0, 25, '0);  // param[25] <= r_ampa
      8'd35: return mk(OP_MUL, 18, 19, 28, '0);  // g_ampa <= gm_ampa * N_ampa
      8'd36: return mk(OP_MUL, 28, 21, 28, '0);  // g_ampa <= g_ampa * r_ampa
      8'd37: return mk(OP_SUB, 5, 20, 29, '0);  // vd_ampa <= V - E_ampa
      8'd38: return mk(OP_MUL, 28, 29, 30, '0);  // i_ampa <= g_ampa * vd_ampa
      8'd39: return mk(OP_ADD, 9, 28, 9, '0);  // gs <= gs + g_ampa
      8'd40: return mk(OP_ADD, 10, 30, 10, '0);  // is <= is + i_ampa
      8'd41: return mk(OP_LDP, 26, 0, 31, '0);  // al_nmda <= param[26]
      8'd42: return mk(OP_LDP, 27, 0, 32, '0);  // be_nmda <= param[27]
      8'd43: return mk(OP_LDP, 28, 0, 33, '0);  // gm_nmda <= param[28]
      8'd44: return mk(OP_LDP, 29, 0, 34, '0);  // N_nmda <= param[29]
      8'd45: return mk(OP_LDP, 30, 0, 35, '0);  // E_nmda <= param[30]
      8'd46: return mk(OP_LDP, 31, 0, 36, '0);  // r_nmda <= param[31]
      8'd47: return mk(OP_MUL, 31, 15, 37, '0);  // aT_nmda <= al_nmda * T
      8'd48: return mk(OP_ADD, 37, 32, 38, '0);  // s_nmda <= aT_nmda + be_nmda
      8'd49: return mk(OP_DIV, 37, 38, 39, '0);  // rinf_nmda <= aT_nmda / s_nmda
      8'd50: return mk(OP_MUL, 38, 1, 40, '0);  // q_nmda <= s_nmda * dt
      8'd51: return mk(OP_SUB, 8, 40, 40, '0);  // q_nmda <= zero - q_nmda
      8'd52: return mk(OP_EXP, 40, 0, 41, '0);  // e_nmda <= exp(q_nmda)
      8'd53: return mk(OP_SUB, 36, 39, 42, '0);  // dr_nmda <= r_nmda - rinf_nmda
      8'd54: return mk(OP_MUL, 42, 41, 42, '0);  // dr_nmda <= dr_nmda * e_nmda
      8'd55: return mk(OP_ADD, 39, 42, 36, '0);  // r_nmda <= rinf_nmda + dr_nmda
      8'd56: return mk(OP_STP, 36, 0, 31, '0);  // param[31] <= r_nmda
      8'd57: return mk(OP_MUL, 33, 34, 43, '0);  // g_nmda <= gm_nmda * N_nmda
      8'd58: return mk(OP_MUL, 43, 36, 43, '0);  // g_nmda <= g_nmda * r_nmda
      8'd59: return mk(OP_SUB, 5, 35, 44, '0);  // vd_nmda <= V - E_nmda
      8'd60: return mk(OP_MUL, 43, 44, 45, '0);  // i_nmda <= g_nmda * vd_nmda
      8'd61: return mk(OP_ADD, 9, 43, 9, '0);  // gs <= gs + g_nmda
      8'd62: return mk(OP_ADD, 10, 45, 10, '0);  // is <= is + i_nmda
      8'd63: return mk(OP_LDP, 32, 0, 46, '0);  // al_gaba <= param[32]
      8'd64: return mk(OP_LDP, 33, 0, 47, '0);  // be_gaba <= param[33]
      8'd65: return mk(OP_LDP, 34, 0, 48, '0);  // gm_gaba <= param[34]
      8'd66: return mk(OP_LDP, 35, 0, 49, '0);  // N_gaba <= param[35]
      8'd67: return mk(OP_LDP, 36, 0, 50, '0);  // E_gaba <= param[36]
      8'd68: return mk(OP_LDP, 37, 0, 51, '0);  // r_gaba <= param[37]
      8'd69: return mk(OP_MUL, 46, 15, 52, '0);  // aT_gaba <= al_gaba * T
      8'd70: return mk(OP_ADD, 52, 47, 53, '0);  // s_gaba <= aT_gaba + be_gaba
      8'd71: return mk(OP_DIV, 52, 53, 54, '0);  // rinf_gaba <= aT_gaba / s_gaba
      8'd72: return mk(OP_MUL, 53, 1, 55, '0);  // q_gaba <= s_gaba * dt
      8'd73: return mk(OP_SUB, 8, 55, 55, '0);  // q_gaba <= zero - q_gaba
      8'd74: return mk(OP_EXP, 55, 0, 56, '0);  // e_gaba <= exp(q_gaba)
      8'd75: return mk(OP_SUB, 51, 54, 57, '0);  // dr_gaba <= r_gaba - rinf_gaba
      8'd76: return mk(OP_MUL, 57, 56, 57, '0);  // dr_gaba <= dr_gaba * e_gaba
      8'd77: return mk(OP_ADD, 54, 57, 51, '0);  // r_gaba <= rinf_gaba + dr_gaba
      8'd78: return mk(OP_STP, 51, 0, 37, '0);  // param[37] <= r_gaba
      8'd79: return mk(OP_MUL, 48, 49, 58, '0);  // g_gaba <= gm_gaba * N_gaba
      8'd80: return mk(OP_MUL, 58, 51, 58, '0);  // g_gaba <= g_gaba * r_gaba
      8'd81: return mk(OP_SUB, 5, 50, 59, '0);  // vd_gaba <= V - E_gaba
      8'd82: return mk(OP_MUL, 58, 59, 60, '0);  // i_gaba <= g_gaba * vd_gaba
      8'd83: return mk(OP_ADD, 9, 58, 9, '0);  // gs <= gs + g_gaba
      8'd84: return mk(OP_ADD, 10, 60, 10, '0);  // is <= is + i_gaba
      8'd85: return mk(OP_STP, 9, 0, 8, '0);  // param[8] <= gs
      8'd86: return mk(OP_STP, 10, 0, 9, '0);  // param[9] <= is
      8'd87: return mk(OP_STX, 9, 0, 0, '0);  // ext_out[0] <= gs
      8'd88: return mk(OP_STX, 10, 0, 1, '0);  // ext_out[1] <= is
      8'd89: return mk(OP_STX, 12, 0, 2, '0);  // ext_out[2] <= acc
      8'd90: return mk(OP_END, 0, 0, 0, '0);  // end of cell
      default: return mk(OP_END, 0, 0, 0);
    endcase
  endfunction

  function automatic np_instr_t ucode(np_kind_e kind, logic [7:0] pc);
    unique case (kind)
      KIND_HH:    return hh_ucode(pc);
      KIND_TRAUB: return traub_ucode(pc);
      KIND_DEND:  return dend_ucode(pc);
      default:    return syn_ucode(pc);
    endcase
  endfunction

endpackage
