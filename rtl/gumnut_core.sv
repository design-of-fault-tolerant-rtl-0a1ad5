// gumnut_core: 8-bit Gumnut-ISA processor with a fault tolerant control unit.
//
// A multi-cycle processor: every instruction passes through the states of the
// control state machine, Fetch -> Decode -> Execute -> (Memory) -> Write Back.
//   Fetch      reads the 18-bit instruction at PC over the instruction bus,
//              holds until inst_ack_i, then loads IR and increments PC.
//   Decode     reads the source registers (rs and r2, or rd for a store).
//   Execute    runs the ALU or shifter and updates the carry and zero flags,
//              forms the memory address rs+offset, or changes PC for jmp, jsb,
//              taken branches and ret.
//   Memory     only for ldm/stm (data bus) and inp/out (I/O port bus); holds
//              until the bus acknowledges, then latches load data.
//   Write Back writes the ALU result or the loaded byte to rd.
// Instructions that need no Memory step go from Execute to Write Back, and
// stores go from Memory straight back to Fetch. An instruction thus takes
// five cycles plus the bus wait states (4+ for non-memory ones).
//
// The state register is protected by the scheme FT selects: FT_TMR
// (triplicated state flip-flops and next-state logic with a voter), FT_LUT
// (next-state logic in a look-up table covering every state code) or FT_ECC
// (state stored as a 12-bit Hamming code word). `fault_i` injects upsets into
// the state storage (see fsm_tmr, fsm_lut, fsm_ecc); `state_o` and
// `fsm_err_o` show the state and whether the controller is seeing an error.
//
// Buses follow the document's simulation signal names: a 12-bit instruction
// address and 18-bit instruction, an 8-bit data bus and an 8-bit I/O port bus,
// each with cyc/stb/ack handshakes (the master holds cyc and stb until ack).
// The register set, PC width, function codes and state codes are the
// document's. The remaining Gumnut encodings, the eight-entry return address
// stack for jsb/ret and the flag rules are taken from the Gumnut instruction
// set as commonly published; interrupts are not implemented and reti, enai,
// disi, wait and stby execute as no-operations. Synchronous, active-high reset
// clears PC, flags and registers; the core runs while rst is low.
module gumnut_core
  import gumnut_pkg::*;
#(
  parameter ft_scheme_t FT = FT_TMR
) (
  input  logic               clk,
  input  logic               rst,
  // instruction bus
  output logic               inst_cyc_o,
  output logic               inst_stb_o,
  input  logic               inst_ack_i,
  output logic [11:0]        inst_adr_o,
  input  logic [17:0]        inst_dat_i,
  // data memory bus
  output logic               data_cyc_o,
  output logic               data_stb_o,
  output logic               data_we_o,
  input  logic               data_ack_i,
  output logic [7:0]         data_adr_o,
  output logic [7:0]         data_dat_o,
  input  logic [7:0]         data_dat_i,
  // I/O port bus
  output logic               port_cyc_o,
  output logic               port_stb_o,
  output logic               port_we_o,
  input  logic               port_ack_i,
  output logic [7:0]         port_adr_o,
  output logic [7:0]         port_dat_o,
  input  logic [7:0]         port_dat_i,
  // fault injection and observation of the control unit
  input  logic [FAULT_W-1:0] fault_i,
  output state_t             state_o,
  output logic               fsm_err_o
);
  // ---------------------------------------------------------------- registers
  logic [11:0] pc;
  logic [17:0] ir;
  logic [7:0]  opa, opb;       // operands latched in Decode
  logic [7:0]  res;            // ALU result or memory address
  logic [7:0]  mdr;            // load data
  logic        flag_c, flag_z;
  logic [11:0] rstack [8];
  logic [2:0]  sp;

  // ------------------------------------------------------------ decode of IR
  logic op_alu_imm, op_mem, op_shift, op_alu_reg, op_jump, op_branch, op_misc;
  logic [2:0] f_rd, f_rs, f_r2;
  logic [1:0] mem_fn;
  logic is_load, is_store, is_port, writes_reg;
  logic branch_taken;

  always_comb begin
    op_alu_imm = (ir[17]    == 1'b0);
    op_mem     = (ir[17:16] == 2'b10);
    op_shift   = (ir[17:15] == 3'b110);
    op_alu_reg = (ir[17:14] == 4'b1110);
    op_jump    = (ir[17:13] == 5'b11110);
    op_branch  = (ir[17:12] == 6'b111110);
    op_misc    = (ir[17:11] == 7'b1111110);
    f_rd       = ir[13:11];
    f_rs       = ir[10:8];
    f_r2       = ir[7:5];
    mem_fn     = ir[15:14];
    is_port    = mem_fn[1];
    is_load    = op_mem && (mem_fn == MEM_LDM || mem_fn == MEM_INP);
    is_store   = op_mem && (mem_fn == MEM_STM || mem_fn == MEM_OUT);
    writes_reg = op_alu_imm || op_alu_reg || op_shift || is_load;
    unique case (ir[11:10])
      BR_BZ:   branch_taken =  flag_z;
      BR_BNZ:  branch_taken = !flag_z;
      BR_BC:   branch_taken =  flag_c;
      BR_BNC:  branch_taken = !flag_c;
    endcase
  end

  // ------------------------------------------------------- control unit FSM
  state_t  state;
  fsm_in_t fin;
  logic    mem_ack;

  assign mem_ack = is_port ? port_ack_i : data_ack_i;

  always_comb begin
    fin.is_mem  = op_mem;
    fin.is_load = is_load;
    unique case (state)
      S_FETCH:  fin.adv = inst_ack_i;
      S_MEMORY: fin.adv = mem_ack;
      default:  fin.adv = 1'b1;
    endcase
  end

  if (FT == FT_TMR) begin : g_tmr
    fsm_tmr u_fsm (.clk(clk), .rst(rst), .in(fin), .fault(fault_i), .state(state), .err(fsm_err_o));
  end else if (FT == FT_LUT) begin : g_lut
    fsm_lut u_fsm (.clk(clk), .rst(rst), .in(fin), .fault(fault_i), .state(state), .err(fsm_err_o));
  end else begin : g_ecc
    fsm_ecc u_fsm (.clk(clk), .rst(rst), .in(fin), .fault(fault_i), .state(state), .err(fsm_err_o));
  end

  assign state_o = state;

  // ------------------------------------------------------------ register file
  logic [7:0] rf_rd1, rf_rd2;
  logic       rf_we;

  assign rf_we = (state == S_WRITEBACK) && writes_reg;

  regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(f_rs), .rd1(rf_rd1),
    .ra2(op_mem ? f_rd : f_r2), .rd2(rf_rd2),
    .we(rf_we), .wa(f_rd), .wd(op_mem ? mdr : res)
  );

  // -------------------------------------------------------------------- ALU
  logic [7:0] alu_b, alu_y;
  logic       alu_c, alu_z;

  always_comb begin
    if (op_alu_imm || op_mem) alu_b = ir[7:0];
    else                      alu_b = opb;
  end

  alu u_alu (
    .shift(op_shift),
    .fn(op_mem ? ALU_ADD : (op_alu_imm ? alu_fn_t'(ir[16:14]) : alu_fn_t'(ir[2:0]))),
    .sfn(shift_fn_t'(ir[1:0])),
    .a(opa), .b(alu_b), .count(ir[7:5]), .cin(flag_c),
    .y(alu_y), .cout(alu_c), .zero(alu_z)
  );

  // --------------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      ir     <= '0;
      opa    <= '0;
      opb    <= '0;
      res    <= '0;
      mdr    <= '0;
      flag_c <= 1'b0;
      flag_z <= 1'b0;
      sp     <= '0;
      for (int i = 0; i < 8; i++) rstack[i] <= '0;
    end else begin
      unique case (state)
        S_FETCH: begin
          if (inst_ack_i) begin
            ir <= inst_dat_i;
            pc <= pc + 12'd1;
          end
        end
        S_DECODE: begin
          opa <= rf_rd1;
          opb <= rf_rd2;
        end
        S_EXECUTE: begin
          if (op_alu_imm || op_alu_reg || op_shift) begin
            res    <= alu_y;
            flag_c <= alu_c;
            flag_z <= alu_z;
          end else if (op_mem) begin
            res <= alu_y;
          end else if (op_jump) begin
            if (ir[12]) begin
              rstack[sp] <= pc;
              sp         <= sp + 3'd1;
            end
            pc <= ir[11:0];
          end else if (op_branch) begin
            if (branch_taken) pc <= pc + {{4{ir[7]}}, ir[7:0]};
          end else if (op_misc && ir[10:8] == MISC_RET) begin
            pc <= rstack[sp - 3'd1];
            sp <= sp - 3'd1;
          end
        end
        S_MEMORY: begin
          if (mem_ack && is_load) mdr <= is_port ? port_dat_i : data_dat_i;
        end
        default: ;
      endcase
    end
  end

  // -------------------------------------------------------------- bus outputs
  always_comb begin
    inst_cyc_o = (state == S_FETCH);
    inst_stb_o = inst_cyc_o;
    inst_adr_o = pc;

    data_cyc_o = (state == S_MEMORY) && op_mem && !is_port;
    data_stb_o = data_cyc_o;
    data_we_o  = data_cyc_o && is_store;
    data_adr_o = res;
    data_dat_o = opb;

    port_cyc_o = (state == S_MEMORY) && op_mem && is_port;
    port_stb_o = port_cyc_o;
    port_we_o  = port_cyc_o && is_store;
    port_adr_o = res;
    port_dat_o = opb;
  end

  // A bus request is held until it is acknowledged (checked except in the
  // cycle right after an injected state upset).
  logic fault_q;
  always_ff @(posedge clk) fault_q <= !rst && (fault_i != '0);

  a_inst_hold: assert property (@(posedge clk) disable iff (rst || fault_q)
                                (inst_cyc_o && !inst_ack_i) |=> inst_cyc_o);
  a_data_hold: assert property (@(posedge clk) disable iff (rst || fault_q)
                                (data_cyc_o && !data_ack_i) |=> data_cyc_o);
  a_port_hold: assert property (@(posedge clk) disable iff (rst || fault_q)
                                (port_cyc_o && !port_ack_i) |=> port_cyc_o);
endmodule
