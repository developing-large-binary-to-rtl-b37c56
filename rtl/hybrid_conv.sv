// hybrid_conv -- sequential binary-to-BCD converter with a single look-up
// unit (E6 by default, E4, E9 or E13), or with two or three E6 units.
//
// Idea: the static E6 lattice (see static_conv_e6) is executed one unit at a
// time on a single circulating register. The register holds the number plus
// leading zeros; the E6 reads six fixed bits of it (the "window") and its
// output is loaded back into the same six bits. Between two decode steps the
// register is rotated left or right so that the six bits the next lattice unit
// needs sit in the window. Units are visited in the order of the lattice map:
// diagonal by diagonal, lower decade first. After the last unit the register
// is rotated back to its start position and then holds the BCD result.
//
// Geometry (N a multiple of 3, K = N/3 - 1 decoded decades):
//   register width W = N + N/3 - 1 (the number plus N/3 - 1 leading zeros;
//     the top BCD digit has only three stored bits, its fourth is always 0);
//   window = register bits [N:N-5];
//   unit (decade k, group g) needs a left rotation of 3g - k, so between two
//   units the register turns by the difference. For N = 12 this gives
//   DECODE, LEFT 3, DECODE, RIGHT 4, DECODE, LEFT 7, DECODE, RIGHT 4, DECODE,
//   RIGHT 4, DECODE, LEFT 2: 12 left and 12 right single-bit shifts.
// With DEC = 9 the single unit is an E9 and the lattice is the E9 one with the
// 1, 2/4 pairing (see static_conv_e9, GROUPING = 1). The window is register
// bits [N:N-8]. A pair (k, g..g+1) needs a left rotation of 3g - k and is a
// full 9-bit decode. A unit left alone (k, g) needs 3g - k - 3 and is a
// "low" decode: the E9's top three inputs are tied to 0 and only its low six
// outputs are loaded. Units are visited by the diagonal of their first group,
// lower decade first; with this pairing every unit then comes after all the
// units it draws bits from. For N = 12 the program is 4 decodes and 22
// shifts, 26 clocks.
// With DEC = 4 the single unit is an E4 on register bits [N:N-3]. Each E6
// unit of the map becomes three E4 steps whose windows are one bit apart
// (rotations 3g - k, +1, +2). For N = 12: 18 decodes, 36 shifts, 54 clocks.
// With NDEC = 2 or 3 (E6 only) there are more E6 units, each on its own
// window, OFF2 and OFF3 bits below the first. A unit of the lattice can be
// done by any of them, each at its own rotation; the program takes the E6
// whose rotation is nearest to the current one, and only that E6 is loaded.
// The default offsets, 4 for the double form and 3, 7 for the triple, are
// the best for 12 bits: 16 clocks (6 decodes, 10 shifts) and 10 clocks.
// With DEC = 13 the single unit is an E13 and the lattice is the E13 one (see
// static_conv_e13; N a multiple of 6). Its 13 inputs and 13 outputs both lie
// on one run of register bits: for the unit on groups g, g+1 of decade 2j
// the run starts at the bottom bit of group g+1, and the upper decade's
// remainder and its pending carry sit on top as one 4-bit value (0..9). The
// window is register bits N-5 up to N+7, taken around the ring (it may wrap
// past the top bit). A unit (2j, g) needs a left rotation of 3g - 2j + 3. The
// head of decade 2j, an E6 in the lattice, is a "low" decode of the E13
// with rotation -2j. Units are visited by diagonal, lower decade first. For
// N = 12 the program is 3 decodes and 16 shifts, 19 clocks.
// The program is computed at elaboration into a small program memory of
// (operation, count) words and run by a program counter and a shift counter.
//
// Interface: start (one cycle, while not busy) loads bin and starts; busy is
// high while the program runs; done pulses for one cycle when bcd is valid;
// bcd holds the packed BCD digits (units in bcd[3:0]) until the next start.
// Timing: one clock per decode-and-load, one clock per single-bit shift; for
// N = 12 that is 6 + 24 = 30 clocks from the start edge to the edge that
// raises done (3 us at 10 MHz). Reset is asynchronous, active low.
//
// From the document: the single-E6 structure, its window position, rotation
// schedule and 12-bit example; using a larger unit (E9, E13) as the single
// decoder; the double and triple forms, with 16 clocks for 12 bits and the
// unused decoder not loaded. This design's choices: the schedule formula for
// other N, the E9 and E13 schedules and windows, the window offsets and
// decoder choice of the double and triple forms, one clock per decode step,
// the start/busy/done handshake and the reset.
module hybrid_conv
  import bcd_pkg::*;
#(
  parameter int unsigned N   = 12,
  parameter int unsigned DEC = 6,           // single unit: 4, 6, 9 or 13 (E4..E13)
  parameter int unsigned NDEC = 1,          // E6 units (DEC = 6 only): 1, 2 or 3
  parameter int          OFF2 = (NDEC == 3) ? 3 : 4,  // window offsets of the
  parameter int          OFF3 = 7,                    // second and third E6
  localparam int unsigned DIGITS = N / 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0]        bin,
  output logic                busy,
  output logic                done,
  output logic [4*DIGITS-1:0] bcd
);
  localparam int unsigned K     = N / 3 - 1;
  localparam int unsigned W     = N + N / 3 - 1;
  localparam int unsigned WIN   = (DEC == 13) ? N - 5 : N + 1 - DEC;
  localparam int unsigned UNITS = K * (K + 1) / 2;
  localparam int unsigned STEPS = (DEC == 4) ? 3 : 1;  // decodes per E6 unit
  localparam int unsigned PLEN  = 2 * STEPS * UNITS + 2;  // decodes, shifts, END
  localparam int unsigned CW    = $clog2(W) + 1;
  localparam int unsigned PW    = $clog2(PLEN);

  initial assert (N >= 6 && N % 3 == 0 && (DEC == 4 || DEC == 6 || (DEC == 9 && N >= 9) ||
                                           (DEC == 13 && N >= 12 && N % 6 == 0)) &&
                  NDEC >= 1 && NDEC <= 3 && (NDEC == 1 || DEC == 6))
    else $error("hybrid_conv: bad N, DEC or NDEC");

  // OP_DECODE loads the whole unit; OP_LOW (E9, E13) loads the low six bits
  // of a unit whose top inputs are tied to 0.
  typedef enum logic [2:0] {OP_DECODE, OP_LOW, OP_SHL, OP_SHR, OP_END} op_t;
  typedef struct packed {
    op_t           op;
    logic [1:0]    sel;       // which E6 decodes (NDEC > 1)
    logic [CW-1:0] count;     // shift distance for OP_SHL / OP_SHR
  } instr_t;
  typedef logic [$bits(instr_t)-1:0] prog_t [PLEN];

  function automatic int abs_i(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Offset of E6 number i: its window starts off_of(i) bits below WIN.
  function automatic int off_of(input int i);
    return (i == 1) ? OFF2 : (i == 2) ? OFF3 : 0;
  endfunction

  // First register bit of E6 number i's window.
  function automatic int base_of(input int i);
    return ((int'(WIN) - off_of(i)) % int'(W) + int'(W)) % int'(W);
  endfunction

  function automatic prog_t build_program();
    prog_t p;
    int    pc, prev, delta, g, rot;
    logic [1:0] sel;
    bit    single;
    op_t   op;
    pc   = 0;
    prev = 0;
    for (int i = 0; i < int'(PLEN); i++) p[i] = {OP_END, 2'd0, CW'(0)};
    for (int d = 0; d < int'(K); d++)
      for (int k = 0; k <= d; k++) begin
        g = d - k;
        sel = 2'd0;
        if (DEC == 4 || DEC == 6) begin
          // Take the E6 whose window needs the shortest turn from here.
          op  = OP_DECODE;
          rot = 3 * g - k;
          for (int i = 1; i < int'(NDEC); i++)
            if (abs_i(3 * g - k - off_of(i) - prev) < abs_i(rot - prev)) begin
              rot = 3 * g - k - off_of(i);
              sel = 2'(i);
            end
        end else if (DEC == 13) begin
          // Units of the even decades only: the head, then E13 at odd g.
          if (k % 2 == 1 || (g != 0 && g % 2 == 0)) continue;
          op  = (g == 0) ? OP_LOW : OP_DECODE;
          rot = (g == 0) ? -k : 3 * g - k + 3;
        end else begin
          // Does a unit start at group g of decade k (1, 2/4 pairing)?
          if (k % 2 == 0 ? (g != 0 && g % 2 == 0) : (g % 2 == 1)) continue;
          single = (k % 2 == 0 && g == 0) || (g == K - k - 1);
          op  = single ? OP_LOW : OP_DECODE;
          rot = single ? 3 * g - k - 3 : 3 * g - k;
        end
        for (int st = 0; st < int'(STEPS); st++) begin
          delta = rot + st - prev;
          prev  = rot + st;
          if (delta > 0)      begin p[pc] = {OP_SHL, 2'd0, CW'(delta)};  pc++; end
          else if (delta < 0) begin p[pc] = {OP_SHR, 2'd0, CW'(-delta)}; pc++; end
          p[pc] = {op, sel, CW'(0)};
          pc++;
        end
      end
    if (prev > 0)      p[pc] = {OP_SHR, 2'd0, CW'(prev)};
    else if (prev < 0) p[pc] = {OP_SHL, 2'd0, CW'(-prev)};
    return p;
  endfunction

  localparam prog_t PROGRAM = build_program();

  logic [W-1:0]  sr;          // circulating shift register
  logic [PW-1:0] pc;
  logic [CW-1:0] cnt;         // single-bit shifts done in the current step
  logic [DEC-1:0] dec_in;     // window, read around the ring
  logic [DEC-1:0] dec_out;    // output of the single look-up unit
  instr_t        ins;
  logic          step_done;
  logic          next_is_end;
  op_t           op_next;

  // The top DEC-6 inputs are tied to 0 for a low decode.
  always_comb
    for (int i = 0; i < int'(DEC); i++)
      dec_in[i] = (ins.op == OP_LOW && i >= 6) ? 1'b0 : sr[(int'(WIN) + i) % int'(W)];

  if (DEC == 4) begin : g_e4
    e4_decoder u_e4 (.x(dec_in), .y(dec_out));
  end else if (DEC == 6) begin : g_e6
    e6_decoder u_e6 (.i(dec_in), .o(dec_out));
  end else if (DEC == 9) begin : g_e9
    e9_decoder u_e9 (.i(dec_in), .o(dec_out));
  end else begin : g_e13
    e13_decoder u_e13 (.i(dec_in), .o(dec_out));
  end

  // Further E6 units of the double and triple forms, each on its own window.
  logic [5:0] more_out [1:2];
  for (genvar u = 1; u <= 2; u++) begin : g_more
    if (u < NDEC) begin : g_on
      logic [5:0] m_in;
      always_comb
        for (int i = 0; i < 6; i++) m_in[i] = sr[(base_of(u) + i) % int'(W)];
      e6_decoder u_e6 (.i(m_in), .o(more_out[u]));
    end else begin : g_off
      assign more_out[u] = '0;
    end
  end

  always_comb begin
    ins       = instr_t'(PROGRAM[pc]);
    step_done = (ins.op == OP_DECODE) || (ins.op == OP_LOW) || (cnt == ins.count - 1'b1);
    op_next     = op_t'(PROGRAM[pc + 1'b1][$bits(instr_t)-1 -: $bits(op_t)]);
    next_is_end = (op_next == OP_END);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      pc   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sr   <= W'(bin);
          pc   <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        unique case (ins.op)
          OP_DECODE:
            if (ins.sel == 2'd0) begin
              for (int i = 0; i < int'(DEC); i++) sr[(int'(WIN) + i) % int'(W)] <= dec_out[i];
            end else begin
              // Only the E6 in use is loaded.
              for (int u = 1; u <= 2; u++)
                if (int'(ins.sel) == u)
                  for (int i = 0; i < 6; i++) sr[(base_of(u) + i) % int'(W)] <= more_out[u][i];
            end
          OP_LOW:
            for (int i = 0; i < 6; i++) sr[(int'(WIN) + i) % int'(W)] <= dec_out[i];
          OP_SHL:    sr <= {sr[W-2:0], sr[W-1]};
          OP_SHR:    sr <= {sr[0], sr[W-1:1]};
          OP_END:    ;
        endcase
        if (step_done) begin
          cnt <= '0;
          pc  <= pc + 1'b1;
          if (next_is_end) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign bcd = (4 * DIGITS)'(sr);

  // The program never runs into its END word while busy.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> ins.op != OP_END);
endmodule
