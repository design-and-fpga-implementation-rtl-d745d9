// ptcm_ref.svh -- reference model of the 16-QAM pragmatic TCM bit
// allocation, shared by the TCM testbenches.
//
// The bit-allocation table is written out here column by column as text
// ("A7A4A1..." = bit 7 of byte A, then bit 4, ...; first column first),
// exactly as it reads in the DVB table, and parsed at run time, so the
// checks do not reuse the design's shift-register formulation. Bytes of a
// group are indexed A=0, B=1, D=2, F=3, G=4, H=5, L=6.

// row strings, 8 columns each, first column first
function automatic string ref_row(bit r78, int row);
  // rows: 0..2 = E1..E3, 3..6 = NE1..NE4
  if (r78) begin
    case (row)
      0: return "A5A2F7F4F1H6H3H0";
      1: return "A6A3A0F5F2H7H4H1";
      2: return "A7A4A1F6F3F0H5H2";
      3: return "B4B0D4D0G4G0L4L0";
      4: return "B5B1D5D1G5G1L5L1";
      5: return "B6B2D6D2G6G2L6L2";
      default: return "B7B3D7D3G7G3L7L3";
    endcase
  end else begin
    case (row)
      0: return "A7A6A5A4A3A2A1A0";
      3: return "B6B4B2B0D6D4D2D0";
      4: return "B7B5B3B1D7D5D3D1";
      default: return "";
    endcase
  end
endfunction

function automatic int ref_byte_idx(byte c);
  case (c)
    "A": return 0; "B": return 1; "D": return 2; "F": return 3;
    "G": return 4; "H": return 5; default: return 6;
  endcase
endfunction

// bit of table row `row` in column k (0 = first) for byte group g
function automatic logic ref_bit(bit r78, int row, int k, logic [7:0] g [7]);
  string s;
  s = ref_row(r78, row);
  if (s.len() == 0) return 1'b0;
  return g[ref_byte_idx(s[2*k])][s[2*k+1] - "0"];
endfunction

// K=7 encoder model, G1 = 171 (X), G2 = 133 (Y); sr[0] newest bit
function automatic logic [1:0] ref_conv(ref logic [6:0] sr, input logic b);
  sr = {sr[5:0], b};
  return {sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6], sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6]};
endfunction

// symbols {U2,U1,C2,C1} of one byte group, in transmission order
function automatic void ref_symbols(bit r78, logic [7:0] g [7], ref logic [6:0] sr,
                                    ref logic [3:0] syms [$]);
  for (int k = 0; k < 8; k++) begin
    if (r78) begin
      logic [1:0] p1, p2, p3;
      p1 = ref_conv(sr, ref_bit(1, 2, k, g));   // E3 first
      p2 = ref_conv(sr, ref_bit(1, 1, k, g));
      p3 = ref_conv(sr, ref_bit(1, 0, k, g));
      // first: U2=NE4 U1=NE3 C2=Y1 C1=X1; second: U2=NE2 U1=NE1 C2=X3 C1=Y2
      syms.push_back({ref_bit(1, 6, k, g), ref_bit(1, 5, k, g), p1[0], p1[1]});
      syms.push_back({ref_bit(1, 4, k, g), ref_bit(1, 3, k, g), p3[1], p2[0]});
    end else begin
      logic [1:0] p1;
      p1 = ref_conv(sr, ref_bit(0, 0, k, g));
      syms.push_back({ref_bit(0, 4, k, g), ref_bit(0, 3, k, g), p1[0], p1[1]});
    end
  end
endfunction

// axis level in Fix(12,11) for (U,C): 00 -> +3, 01 -> +1, 10 -> -1, 11 -> -3
function automatic logic signed [11:0] ref_level(logic u, logic c);
  case ({u, c})
    2'b00: return 12'sh796;
    2'b01: return 12'sh287;
    2'b10: return 12'shD79;
    default: return 12'sh86A;
  endcase
endfunction
