// decomposed_control_unit: the control path of an ARM7TDMI-class pipeline
// built around a decomposed instruction decoder.
//
// Control signals are decoded "just in time": the decode stage does not
// produce every signal of every later stage. It identifies the instruction
// once, as an 8-bit intermediate code, and carries that code down the
// pipeline in the instruction state registers (ISR). Each stage that needs
// control signals decodes them from the code with its own signal decoder and
// puts them in control-signal registers (CSR) for the stage after it.
//
// Pipeline (one instruction per cycle, no stalls):
//   cycle t    instr/instr_valid presented
//   cycle t+1  instruction register (ir) holds it; instr_decoder gives
//              id_code; the decode-stage signal_decoder gives id_ctrl (used
//              in this cycle) and the execute-stage signals
//   cycle t+2  ex_ctrl (CSR) and ex_code (ISR) hold them; the
//              execute-stage signal_decoder decodes ex_code into the
//              memory/write-back signals
//   cycle t+3  mem_ctrl (CSR) and mem_code (ISR) hold them
// A cycle with instr_valid = 0 leaves ir unchanged, so the decoder inputs do
// not toggle, and sends code 0 (no instruction, all control signals 0) down
// the pipeline. Reset (rst_n low, synchronous) clears every register to the
// no-instruction state.
//
// Every decoder is decomposed into two sub-decoders of which only one is on.
// The *_dec1_on outputs tell which one is on in each decoder, for power or
// activity accounting. The datapath that these signals drive is not part of
// this design. ir is brought out for the operand fields (registers,
// immediates, condition, S bit), which the datapath takes from the
// instruction directly.
//
// The pipeline depth and the split of signals between stages are this
// design's choice; the decomposition follows the decomposed-decoder scheme.
module decomposed_control_unit
  import ctrl_pkg::*;
#(
  parameter int         PART_BIT    = 26,
  parameter code_mask_t INIT_GROUP0 = mov_group()
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  logic [31:0] instr,
  output logic [31:0] ir,            // instruction register (FF1..FFn)
  output icode_t      id_code,       // intermediate code, decode stage
  output id_ctrl_t    id_ctrl,       // decode-stage (current state) signals
  output icode_t      ex_code,       // ISR, execute stage
  output ex_ctrl_t    ex_ctrl,       // CSR, execute stage
  output icode_t      mem_code,      // ISR, memory/write-back stage
  output mem_ctrl_t   mem_ctrl,      // CSR, memory/write-back stage
  output logic        i_dec1_on,     // I-Decoder1 on (else I-Decoder0)
  output logic        s_id_dec1_on,  // decode-stage S-Decoder1 on
  output logic        s_ex_dec1_on   // execute-stage S-Decoder1 on
);
  logic   ir_valid;
  icode_t raw_code;
  logic   i_c0, i_c1, sid_c0, sid_c1, sex_c0, sex_c1;
  ctrl_t  ctrl_id, ctrl_ex;

  // Instruction register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir       <= '0;
      ir_valid <= 1'b0;
    end else begin
      ir_valid <= instr_valid;
      if (instr_valid) ir <= instr;
    end
  end

  // Decode stage
  instr_decoder #(.PART_BIT(PART_BIT)) u_id (
    .instr     (ir),
    .code      (raw_code),
    .i_control0(i_c0),
    .i_control1(i_c1)
  );

  assign id_code = ir_valid ? raw_code : '0;

  signal_decoder #(.STAGE(STAGE_ID), .INIT_GROUP0(INIT_GROUP0)) u_sd_id (
    .code      (id_code),
    .ctrl      (ctrl_id),
    .s_control0(sid_c0),
    .s_control1(sid_c1)
  );

  assign id_ctrl = ctrl_id.id;

  // ISR and CSR of the execute stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_code <= '0;
      ex_ctrl <= '0;
    end else begin
      ex_code <= id_code;
      ex_ctrl <= ctrl_id.ex;
    end
  end

  // Execute stage: decode the memory/write-back signals from the ISR
  signal_decoder #(.STAGE(STAGE_EX), .INIT_GROUP0(INIT_GROUP0)) u_sd_ex (
    .code      (ex_code),
    .ctrl      (ctrl_ex),
    .s_control0(sex_c0),
    .s_control1(sex_c1)
  );

  // ISR and CSR of the memory/write-back stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_code <= '0;
      mem_ctrl <= '0;
    end else begin
      mem_code <= ex_code;
      mem_ctrl <= ctrl_ex.mem;
    end
  end

  assign i_dec1_on    = ~i_c1;
  assign s_id_dec1_on = ~sid_c1;
  assign s_ex_dec1_on = ~sex_c1;

  // Exactly one sub-decoder of each pair is on.
  always_comb begin
    assert (i_c0 != i_c1);
    assert (sid_c0 != sid_c1);
    assert (sex_c0 != sex_c1);
  end

endmodule
