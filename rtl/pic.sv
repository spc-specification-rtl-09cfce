// pic: one reduced 8259A-compatible programmable interrupt controller.
//
// Kept from the 8259A: the ICW1-ICW4 initialization sequence, the interrupt
// mask (OCW1), non-specific and specific EOI and the "set priority" command
// (OCW2), IRR/ISR read selection and special mask mode (OCW3), automatic EOI,
// and a two-pulse interrupt acknowledge returning an 8086-style vector.
// Dropped: poll command, special fully nested mode, buffered mode, single
// mode, edge/level selection and the cascade bus.
//
// Requests: a request input that is high for at least one clock sets its
// IRR bit, which stays set until that level is acknowledged.  Between the
// first and the second acknowledge the IRR is frozen.  The mask acts on the
// IRR output, so a masked request is still recorded.
//
// Priority: priorities rotate from `low_prio`: the level after it is highest.
// After initialization low_prio = 7 (IR0 highest, IR7 lowest); OCW2 code 110
// with level L makes L the lowest (L = 2 gives IR3, IR4, ... IR7, IR0, IR1,
// IR2).  In normal mode an in-service level blocks itself and every lower
// level; in special mask mode it blocks only itself.
//
// Acknowledge: the first `inta` pulse picks the highest unblocked request,
// sets its ISR bit, clears its IRR bit and freezes the IRR; the second
// returns the vector, unfreezes the IRR and, with AEOI, clears the ISR bit.
// `vector` = {ICW2[7:3], level} is valid combinationally at both pulses.
// With no request at the first pulse the vector of level 7 is returned and no
// ISR bit is set.
//
// Register port: sel, dir (1 = write), a0 (port base+0 / base+1), wdata,
// rdata (combinational while sel is high).  A write takes effect on the clock
// edge at the end of its cycle.  The register map, the hardwired ICW fields
// and the acknowledge sequence follow the specification; reset of the ISR
// and of the acknowledge state on ICW1 is this implementation's choice.
module pic (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       dir,
  input  logic       a0,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] ir,
  input  logic       inta,
  output logic [7:0] vector,
  output logic       intr,
  output logic       ready     // initialization sequence complete
);
  typedef enum logic [2:0] {S_ICW1, S_ICW2, S_ICW3, S_ICW4, S_READY} init_e;

  init_e       init_st;
  logic [4:0]  vec_base;
  logic        aeoi;
  logic [7:0]  imr, irr, isr;
  logic        read_isr;
  logic        smm;
  logic [2:0]  low_prio;
  logic        ack_phase;   // 1 between first and second acknowledge
  logic [2:0]  cur_level;

  // Rotate so that bit 0 of the result is the highest-priority level.
  function automatic logic [7:0] rot_r(input logic [7:0] v, input logic [2:0] n);
    logic [15:0] d;
    d = {v, v} >> n;
    return d[7:0];
  endfunction

  // Index of the first set bit (0 if none).
  function automatic logic [2:0] first_one(input logic [7:0] v);
    for (int i = 0; i < 8; i++)
      if (v[i]) return 3'(i);
    return 3'd0;
  endfunction

  logic [2:0] base;        // highest-priority level
  logic [7:0] req_r, isr_r, cand_r;
  logic       pending;
  logic       stop;
  logic [2:0] win_level;

  always_comb begin
    base   = low_prio + 3'd1;
    req_r  = rot_r(irr & ~imr, base);
    isr_r  = rot_r(isr, base);
    pending = 1'b0;
    stop    = 1'b0;
    cand_r  = '0;
    if (smm) begin
      cand_r  = req_r & ~isr_r;
      pending = |cand_r;
    end else begin
      // A request is served only if it outranks every in-service level.
      stop = 1'b0;
      for (int i = 0; i < 8; i++) begin
        if (isr_r[i]) stop = 1'b1;
        if (!stop && req_r[i]) cand_r[i] = 1'b1;
      end
      pending = |cand_r;
    end
    win_level = first_one(cand_r) + base;
  end

  assign vector = ack_phase ? {vec_base, cur_level}
                            : {vec_base, pending ? win_level : 3'd7};

  always_comb begin
    rdata = 8'h00;
    if (sel) rdata = a0 ? imr : (read_isr ? isr : irr);
  end

  // Highest-priority in-service level, for non-specific EOI.
  logic [2:0] top_isr;
  assign top_isr = first_one(isr_r) + base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_st   <= S_ICW1;
      vec_base  <= '0;
      aeoi      <= 1'b0;
      imr       <= '0;
      irr       <= '0;
      isr       <= '0;
      read_isr  <= 1'b0;
      smm       <= 1'b0;
      low_prio  <= 3'd7;
      ack_phase <= 1'b0;
      cur_level <= '0;
      intr      <= 1'b0;
    end else begin
      if (!ack_phase) irr <= irr | ir;
      intr <= (init_st == S_READY) && (pending || ack_phase);

      // ---------------- interrupt acknowledge ----------------
      if (inta) begin
        if (!ack_phase) begin
          ack_phase <= 1'b1;
          if (pending) begin
            cur_level           <= win_level;
            isr[win_level]      <= 1'b1;
            irr[win_level]      <= 1'b0;
          end else begin
            cur_level <= 3'd7;
          end
        end else begin
          ack_phase <= 1'b0;
          if (aeoi) isr[cur_level] <= 1'b0;
        end
      end

      // ---------------- register writes ----------------
      if (sel && dir) begin
        if (!a0 && wdata[4]) begin                 // ICW1
          init_st   <= S_ICW2;
          imr       <= '0;
          isr       <= '0;
          low_prio  <= 3'd7;
          smm       <= 1'b0;
          read_isr  <= 1'b0;
          ack_phase <= 1'b0;
        end else if (!a0 && !wdata[3]) begin       // OCW2
          unique case (wdata[7:5])
            3'b001: if (|isr) isr[top_isr] <= 1'b0;     // non-specific EOI
            3'b011: isr[wdata[2:0]] <= 1'b0;            // specific EOI
            3'b110: low_prio <= wdata[2:0];             // set priority
            default: ;
          endcase
        end else if (!a0) begin                     // OCW3
          if (wdata[6]) smm <= wdata[5];
          if (wdata[1]) read_isr <= wdata[0];
        end else begin
          unique case (init_st)
            S_ICW2:  begin vec_base <= wdata[7:3]; init_st <= S_ICW3; end
            S_ICW3:  init_st <= S_ICW4;               // cascade fields hardwired
            S_ICW4:  begin aeoi <= wdata[1]; init_st <= S_READY; end
            S_READY: imr <= wdata;                    // OCW1
            default: ;                                // before ICW1: ignored
          endcase
        end
      end
    end
  end

  assign ready = (init_st == S_READY);
endmodule
