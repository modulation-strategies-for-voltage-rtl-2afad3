// mc_modulator: indirect space vector modulation (ISVM) switching-state
// generator of the matrix converter.
//
// new_data: the five thresholds and the sector byte are taken with the
// enable/acknowledge handshake at the start of a carrier period (saw_sync)
// or at once in programming mode; data_ack is a one-clock pulse.
//
// comparator: the saw value s is compared with the thresholds; the pattern
// part is 0 (s < c1), 1 (s < c2), 2 (s < c3), 3 (s < c4), 4 (s < c5) or 5.
// Parts 0..2 use the first virtual rectifier vector i_r1, parts 3..5 the
// second one i_r2. Parts 2 and 3 are the zero vector; parts 0, 1, 4, 5 are
// v_i1, v_i2, v_i2, v_i1, or v_i2, v_i1, v_i1, v_i2 with the optimized
// pattern and an odd sum of the sector numbers.
//
// output_lookup: for rectifier sector r and inverter sector k (1..6):
//   i_r1, i_r2 = entries r and r+1 (cyclic) of UV, UW, VW, VU, WU, WV
//   v_i1, v_i2 = entries k and k+1 (cyclic) of 100, 110, 010, 011, 001, 101
//   zero vector: 111 if the inverter sector is odd, 000 if even; with the
//   optimized pattern, 111 if the rectifier sector is odd, 000 if even.
// An output phase whose inverter bit is 1 is joined to the input phase that
// the rectifier vector puts on the positive rail, otherwise to the one on
// the negative rail (the product of the two virtual stages' switch
// matrices). Outputs are the nine bidirectional switch references in the
// mc_pkg bit order, registered, so they follow the saw by one clock. A
// sector number outside 1..6 gives all zeros, which the commutation unit
// ignores. The part thresholds are this design's; the vector tables and the
// zero-vector rule follow the source's tables.
module mc_modulator
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        optimized,
  input  logic [15:0] saw,
  input  logic        programming_mode,
  input  logic        saw_sync,
  input  logic [16:0] value1,
  input  logic [16:0] value2,
  input  logic [16:0] value3,
  input  logic [16:0] value4,
  input  logic [16:0] value5,
  input  logic [7:0]  sector,
  input  logic        output_data_enable,
  output logic        data_ack,
  output logic [8:0]  sw
);

  logic [16:0] c [5];
  logic [3:0]  rect_sector, inv_sector;
  logic [2:0]  part;

  // new_data
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < 5; i++) c[i] <= '0;
      rect_sector <= '0;
      inv_sector  <= '0;
      data_ack    <= 1'b0;
    end else begin
      data_ack <= 1'b0;
      if (output_data_enable && !data_ack && (saw_sync || programming_mode)) begin
        c[0]        <= value1;
        c[1]        <= value2;
        c[2]        <= value3;
        c[3]        <= value4;
        c[4]        <= value5;
        rect_sector <= sector[7:4];
        inv_sector  <= sector[3:0];
        data_ack    <= 1'b1;
      end
    end
  end

  // comparator
  always_comb begin
    logic [16:0] s;
    s = 17'(saw);
    if      (s < c[0]) part = 3'd0;
    else if (s < c[1]) part = 3'd1;
    else if (s < c[2]) part = 3'd2;
    else if (s < c[3]) part = 3'd3;
    else if (s < c[4]) part = 3'd4;
    else               part = 3'd5;
  end

  // rectifier vector n (0..5): input phase on the positive / negative rail
  function automatic logic [1:0] rect_pos(input int n);
    case (n)
      0, 1:    return 2'd0;   // UV, UW
      2, 3:    return 2'd1;   // VW, VU
      default: return 2'd2;   // WU, WV
    endcase
  endfunction
  function automatic logic [1:0] rect_neg(input int n);
    case (n)
      0, 5:    return 2'd1;   // UV, WV
      1, 2:    return 2'd2;   // UW, VW
      default: return 2'd0;   // VU, WU
    endcase
  endfunction
  // inverter vector n (0..5), bit 2 = phase A
  function automatic logic [2:0] inv_vec(input int n);
    case (n)
      0:       return 3'b100;
      1:       return 3'b110;
      2:       return 3'b010;
      3:       return 3'b011;
      4:       return 3'b001;
      default: return 3'b101;
    endcase
  endfunction

  // output_lookup
  always_ff @(posedge clk) begin
    int         r, k, rn;
    logic       swap, zero_ones;
    logic [2:0] iv;
    logic [1:0] pos, neg;
    logic [8:0] nxt;
    if (reset) begin
      sw <= '0;
    end else begin
      nxt = '0;
      if (rect_sector >= 4'd1 && rect_sector <= 4'd6 &&
          inv_sector  >= 4'd1 && inv_sector  <= 4'd6) begin
        r         = int'(rect_sector) - 1;
        k         = int'(inv_sector) - 1;
        swap      = optimized && (rect_sector[0] ^ inv_sector[0]);
        zero_ones = optimized ? rect_sector[0] : inv_sector[0];
        rn        = (part <= 3'd2) ? r : (r + 1) % 6;
        pos       = rect_pos(rn);
        neg       = rect_neg(rn);
        unique case (part)
          3'd0, 3'd5: iv = inv_vec(swap ? (k + 1) % 6 : k);
          3'd1, 3'd4: iv = inv_vec(swap ? k : (k + 1) % 6);
          default:    iv = zero_ones ? 3'b111 : 3'b000;
        endcase
        for (int y = 0; y < 3; y++)
          nxt[sw_idx(y, iv[2 - y] ? int'(pos) : int'(neg))] = 1'b1;
      end
      sw <= nxt;
    end
  end

endmodule
