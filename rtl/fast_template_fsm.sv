// fast_template_fsm: decodes the fields of one FAST message template into a
// book command.
//
// FAST sends integers in stop-bit encoding: each byte carries 7 value bits,
// most significant group first, and bit 7 set marks the last byte of the
// field. Signed fields (the delta operator) take their sign from bit 6 of the
// first byte. Fields carrying a COPY or DEFAULT operator may be left out of
// the stream; the presence map (PMAP, the first payload byte, bits 6..0 in
// field order) says which are there. Absent COPY fields repeat the value the
// field had in the previous message of this template, absent DEFAULT fields
// take the template's default, and DELTA fields add their signed value to the
// previous value. Those previous values are this template's dictionary.
//
// Operation: the PMAP flit is captured whenever it passes. The start pulse
// (template-ID flit naming this template) works out which fields are present
// and points the field counter at the first one. Each data flit is shifted
// into the accumulator; a flit with the stop bit stores the field and moves
// the field counter to the next present field. After the last field the FSM
// spends one cycle (EMIT) resolving absent fields and operators, updating the
// dictionary and presenting cmd_vld with the command. If the packet ends
// before the last field, dec_err pulses and nothing is emitted. Flits after
// the last field are ignored (one message per packet).
//
// Timing: one flit per clock, no stalls. The clock edge that takes the flit
// with the last stop bit moves the FSM to EMIT; the next edge registers the
// command, so cmd_vld is high for one cycle, two cycles after that flit.
//
// Following the design description: one FSM per template with its PMAP and
// field counter, templates with default values and delta operations relying
// on previous values. Own choices: the template contents (fixfast_pkg), the
// supported operators and the 32-bit field width.
module fast_template_fsm
  import fixfast_pkg::*;
#(
  parameter template_t   TEMPLATE = TMPL_UPDATE,
  parameter cmd_action_e ACTION   = CMD_UPDATE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_flit,
  input  logic        in_vld,
  input  logic        in_eop,
  input  flit_role_e  in_role,
  input  logic        start,      // template-ID flit names this template
  output logic        cmd_vld,
  output book_cmd_t   cmd,
  output logic        dec_err,
  output logic        busy
);

  typedef enum logic [1:0] { S_IDLE, S_FIELDS, S_EMIT } state_e;
  localparam int unsigned FI_W = $clog2(MAX_FIELDS + 1);

  state_e                          state_q;
  logic [6:0]                      pmap_q;
  logic [MAX_FIELDS-1:0]           present_q, present_d;
  logic [FI_W-1:0]                 fidx_q;      // field counter
  logic [VAL_W-1:0]                acc_q, acc_d;
  logic                            first_q;
  logic [MAX_FIELDS-1:0][VAL_W-1:0] val_q;      // decoded values
  logic [MAX_FIELDS-1:0][VAL_W-1:0] prev_q;     // dictionary
  logic [MAX_FIELDS-1:0][VAL_W-1:0] res;        // resolved values
  logic [FI_W-1:0]                 first_fld, next_fld;
  logic                            data_in;

  // which fields are in the stream, from the PMAP
  always_comb begin
    int k;
    k = 0;
    present_d = '0;
    for (int i = 0; i < MAX_FIELDS; i++) begin
      if (TEMPLATE[i].used) begin
        if (TEMPLATE[i].op == OP_NONE || TEMPLATE[i].op == OP_DELTA) begin
          present_d[i] = 1'b1;
        end else begin
          present_d[i] = (k < 7) ? pmap_q[6-k] : 1'b0;
          k++;
        end
      end
    end
  end

  // first present field, and the present field after the current one
  always_comb begin
    first_fld = FI_W'(MAX_FIELDS);
    for (int i = MAX_FIELDS - 1; i >= 0; i--)
      if (present_d[i]) first_fld = FI_W'(i);
    next_fld = FI_W'(MAX_FIELDS);
    for (int i = MAX_FIELDS - 1; i >= 0; i--)
      if (present_q[i] && FI_W'(i) > fidx_q) next_fld = FI_W'(i);
  end

  assign data_in = in_vld && in_role == ROLE_DATA && state_q == S_FIELDS;

  // stop-bit accumulation; a DELTA field is signed
  always_comb begin
    logic sgn;
    sgn = 1'b0;
    for (int i = 0; i < MAX_FIELDS; i++)
      if (FI_W'(i) == fidx_q && TEMPLATE[i].op == OP_DELTA) sgn = in_flit[6];
    if (first_q) acc_d = ({VAL_W{sgn}} << 7) | VAL_W'(in_flit[6:0]);
    else         acc_d = (acc_q << 7) | VAL_W'(in_flit[6:0]);
  end

  // operator resolution
  always_comb begin
    for (int i = 0; i < MAX_FIELDS; i++) begin
      res[i] = '0;
      if (TEMPLATE[i].used) begin
        unique case (TEMPLATE[i].op)
          OP_NONE:    res[i] = val_q[i];
          OP_DELTA:   res[i] = prev_q[i] + val_q[i];
          OP_COPY:    res[i] = present_q[i] ? val_q[i] : prev_q[i];
          OP_DEFAULT: res[i] = present_q[i] ? val_q[i] : TEMPLATE[i].dflt;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      pmap_q    <= '0;
      present_q <= '0;
      fidx_q    <= '0;
      acc_q     <= '0;
      first_q   <= 1'b1;
      val_q     <= '0;
      prev_q    <= '0;
      cmd_vld   <= 1'b0;
      cmd       <= '0;
      dec_err   <= 1'b0;
    end else begin
      cmd_vld <= 1'b0;
      dec_err <= 1'b0;
      if (in_vld && in_role == ROLE_PMAP) pmap_q <= in_flit[6:0];
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            present_q <= present_d;
            fidx_q    <= first_fld;
            first_q   <= 1'b1;
            val_q     <= '0;
            if (first_fld == FI_W'(MAX_FIELDS)) state_q <= S_EMIT;
            else if (in_eop) dec_err <= 1'b1;
            else state_q <= S_FIELDS;
          end
        end
        S_FIELDS: begin
          if (data_in) begin
            if (in_flit[7]) begin
              val_q[fidx_q] <= acc_d;
              first_q       <= 1'b1;
              fidx_q        <= next_fld;
              if (next_fld == FI_W'(MAX_FIELDS)) state_q <= S_EMIT;
              else if (in_eop) begin
                state_q <= S_IDLE;
                dec_err <= 1'b1;
              end
            end else begin
              acc_q   <= acc_d;
              first_q <= 1'b0;
              if (in_eop) begin
                state_q <= S_IDLE;
                dec_err <= 1'b1;
              end
            end
          end else if (in_vld && in_eop) begin
            state_q <= S_IDLE;
            dec_err <= 1'b1;
          end
        end
        S_EMIT: begin
          state_q <= S_IDLE;
          cmd_vld <= 1'b1;
          cmd     <= '0;
          cmd.action <= ACTION;
          for (int i = 0; i < MAX_FIELDS; i++) begin
            if (TEMPLATE[i].used) begin
              prev_q[i] <= res[i];
              unique case (TEMPLATE[i].dst)
                F_BOOK:  cmd.book  <= BOOK_AW'(res[i]);
                F_SIDE:  cmd.side  <= side_e'(res[i][0]);
                F_LEVEL: cmd.level <= LEVEL_W'(res[i]);
                F_PRICE: cmd.price <= PRICE_W'(res[i]);
                F_QTY:   cmd.qty   <= QTY_W'(res[i]);
                F_COUNT: cmd.count <= CNT_W'(res[i]);
                default: ;
              endcase
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = state_q != S_IDLE;

endmodule
