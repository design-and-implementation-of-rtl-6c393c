// p8_pkg: shared types, constants and the microprogram of the P8 CPU.
//
// The P8 is an 8-bit accumulator machine with a microprogrammed control unit.
// Every instruction is one opcode byte {OP[4:0], MODE[2:0]}, optionally
// followed by an address or data byte.  The control store is addressed by
// {IR[7:0], A3, MIP[2:0]}; each word is 32 bits, of which 31 drive the CPU.
//
// The bit assignment of the 32-bit microword, the opcode and addressing-mode
// codes, the ALU operation bits and the microinstruction sequence of every
// instruction (and hence its clock count) follow the P8 design.  Several of
// the datapath control bits are active low, as in the original hardware
// (tri-state output enables and the 74LS163 parallel load); the microprogram
// below is written with active-high "logical" micro-operation masks and
// converted to the physical encoding by XOR with CW_ACTIVE_LOW.
//
// This design's own choices: opcodes the instruction set does not define
// execute as a one-byte no-operation; unused control-store words hold that
// same no-operation word.
package p8_pkg;

  // 5-bit operation field of the opcode
  typedef enum logic [4:0] {
    OP_FETCH = 5'b00000,
    OP_IN    = 5'b00001,
    OP_OUT   = 5'b00010,
    OP_JMP   = 5'b00100,
    OP_JNZ   = 5'b00101,
    OP_JZ    = 5'b00110,
    OP_CMP   = 5'b00111,
    OP_LDA   = 5'b01000,
    OP_LDR   = 5'b01001,
    OP_STA   = 5'b01010,
    OP_STR   = 5'b01011,
    OP_ADD   = 5'b01100,
    OP_SUB   = 5'b01101,
    OP_DEC   = 5'b01110,
    OP_OR    = 5'b10000,
    OP_INV   = 5'b10001,
    OP_SHL   = 5'b10010
  } p8_op_e;

  // 3-bit addressing-mode field of the opcode
  typedef enum logic [2:0] {
    MD_DIRECT = 3'b000,   // byte 2 is the memory (or port) address
    MD_REG_A  = 3'b010,   // operand is the A register
    MD_REG_R  = 3'b011,   // operand is the R register
    MD_IND    = 3'b100,   // operand address is in R (register indirect)
    MD_IMM    = 3'b110    // byte 2 is the operand
  } p8_mode_e;

  // Physical 32-bit microword, bit 31 first.  Fields ending in _n are active low.
  typedef struct packed {
    logic iow;          // C31 I/O write (latched by PAL 3)
    logic ior;          // C30 I/O read
    logic unused29;     // C29 not used
    logic cmp;          // C28 ALU compare (A minus B minus 1)
    logic cond_en;      // C27 conditional instruction: enable A3 from Z
    logic z_load;       // C26 load Z from the ALU A=B output
    logic r_load;       // C25 load R from IB
    logic r_out_n;      // C24 R buffer drives IB
    logic a_load;       // C23 load A from the ALU output
    logic a_out_n;      // C22 A buffer drives IB
    logic shl;          // C21 ALU A plus A
    logic inv;          // C20 ALU not B
    logic lor;          // C19 ALU A or B
    logic dec;          // C18 ALU A minus 1
    logic sub;          // C17 ALU A minus B
    logic add;          // C16 ALU A plus B
    logic pass;         // C15 ALU passes B
    logic ip_out_n;     // C14 IP drives the address bus to AR
    logic ip_load_n;    // C13 IP loads from IB
    logic ip_inc;       // C12 IP count enable
    logic or_load;      // C11 load OR from IB
    logic or_out_n;     // C10 OR drives the address bus to AR
    logic drout_load;   // C9  load DR(OUT) from IB
    logic drout_out_n;  // C8  DR(OUT) drives the external data bus (latched)
    logic drin_load;    // C7  load DR(IN) from the external data bus
    logic drin_out_n;   // C6  DR(IN) drives IB
    logic ar_load;      // C5  load AR from the address bus
    logic ar_out_n;     // C4  AR drives the external address bus (latched)
    logic memw;         // C3  memory write (latched by PAL 3)
    logic memr;         // C2  memory read
    logic ir_load;      // C1  load IR from IB
    logic ir_reset;     // C0  last microword: clear IR, restart MIP
  } p8_cw_t;

  // Register-load strobes and other outputs of the PAL 1 / PAL 3 pipeline
  typedef struct packed {
    logic ar_load;
    logic dri_load;
    logic dro_load;
    logic or_load;
    logic a_load;
    logic r_load;
    logic z_load;
    logic ir_load;
    logic ir_reset;
  } p8_strobe_t;

  localparam int unsigned CS_AW = 12;         // control store address bits
  localparam int unsigned CS_DEPTH = 1 << CS_AW;

  // Bits that are active low in the physical microword
  localparam logic [31:0] CW_ACTIVE_LOW = (32'h1 << 4) | (32'h1 << 6) | (32'h1 << 8) |
                                          (32'h1 << 10) | (32'h1 << 13) | (32'h1 << 14) |
                                          (32'h1 << 22) | (32'h1 << 24);

  // Logical (active-high) micro-operation masks, one per control bit
  localparam logic [31:0] U_IR_RESET   = 32'h1 << 0;
  localparam logic [31:0] U_IR_LOAD    = 32'h1 << 1;
  localparam logic [31:0] U_MEMR       = 32'h1 << 2;
  localparam logic [31:0] U_MEMW       = 32'h1 << 3;
  localparam logic [31:0] U_AR_OUT     = 32'h1 << 4;
  localparam logic [31:0] U_AR_LOAD    = 32'h1 << 5;
  localparam logic [31:0] U_DRIN_OUT   = 32'h1 << 6;
  localparam logic [31:0] U_DRIN_LOAD  = 32'h1 << 7;
  localparam logic [31:0] U_DROUT_OUT  = 32'h1 << 8;
  localparam logic [31:0] U_DROUT_LOAD = 32'h1 << 9;
  localparam logic [31:0] U_OR_OUT     = 32'h1 << 10;
  localparam logic [31:0] U_OR_LOAD    = 32'h1 << 11;
  localparam logic [31:0] U_IP_INC     = 32'h1 << 12;
  localparam logic [31:0] U_IP_LOAD    = 32'h1 << 13;
  localparam logic [31:0] U_IP_OUT     = 32'h1 << 14;
  localparam logic [31:0] U_PASS       = 32'h1 << 15;
  localparam logic [31:0] U_ADD        = 32'h1 << 16;
  localparam logic [31:0] U_SUB        = 32'h1 << 17;
  localparam logic [31:0] U_DEC        = 32'h1 << 18;
  localparam logic [31:0] U_LOR        = 32'h1 << 19;
  localparam logic [31:0] U_INV        = 32'h1 << 20;
  localparam logic [31:0] U_SHL        = 32'h1 << 21;
  localparam logic [31:0] U_A_OUT      = 32'h1 << 22;
  localparam logic [31:0] U_A_LOAD     = 32'h1 << 23;
  localparam logic [31:0] U_R_OUT      = 32'h1 << 24;
  localparam logic [31:0] U_R_LOAD     = 32'h1 << 25;
  localparam logic [31:0] U_Z_LOAD     = 32'h1 << 26;
  localparam logic [31:0] U_COND       = 32'h1 << 27;
  localparam logic [31:0] U_CMP        = 32'h1 << 28;
  localparam logic [31:0] U_IOR        = 32'h1 << 30;
  localparam logic [31:0] U_IOW        = 32'h1 << 31;

  // Recurring microinstruction groups
  // read the byte at IP: AR <- IP, then DR(IN) <- memory, IP <- IP + 1
  localparam logic [31:0] U_RD_IP0  = U_IP_OUT | U_AR_LOAD | U_AR_OUT | U_MEMR;
  localparam logic [31:0] U_RD_IP1  = U_AR_OUT | U_MEMR | U_DRIN_LOAD | U_IP_INC;
  // same, without incrementing IP (jump target byte)
  localparam logic [31:0] U_RD_JP1  = U_AR_OUT | U_MEMR | U_DRIN_LOAD;
  // OR <- DR(IN), OR <- R
  localparam logic [31:0] U_OR_DR   = U_DRIN_OUT | U_OR_LOAD;
  localparam logic [31:0] U_OR_R    = U_R_OUT | U_OR_LOAD;
  // read the memory byte at OR: AR <- OR, then DR(IN) <- memory
  localparam logic [31:0] U_RD_OR0  = U_OR_OUT | U_AR_LOAD | U_AR_OUT | U_MEMR;
  localparam logic [31:0] U_RD_OR1  = U_AR_OUT | U_MEMR | U_DRIN_LOAD;
  // read the port at OR
  localparam logic [31:0] U_IN_OR0  = U_OR_OUT | U_AR_LOAD | U_AR_OUT | U_IOR;
  localparam logic [31:0] U_IN_OR1  = U_AR_OUT | U_IOR | U_DRIN_LOAD;
  // write: AR <- OR and DR(OUT) <- IB, then strobe, then hold
  localparam logic [31:0] U_WR_OR0  = U_OR_OUT | U_AR_LOAD | U_AR_OUT | U_DROUT_LOAD | U_DROUT_OUT;
  localparam logic [31:0] U_WR_HOLD = U_AR_OUT | U_DROUT_OUT;

  localparam logic [31:0] U_NOP = '0;

  // Microprogram of one instruction sub-block: up to eight words and their count
  typedef struct packed {
    logic [7:0][31:0] w;
    logic [3:0]       n;
  } p8_usub_t;

  // Logical microword sequence for one (opcode, A3) sub-block; the last word
  // used is marked with U_IR_RESET.
  function automatic p8_usub_t p8_sequence(input logic [4:0] op, input logic [2:0] md,
                                           input logic a3);
    logic [7:0][31:0] seq;
    logic [31:0] src;      // IB source of the operand in the final word
    logic        valid_md; // mode is one of the five operand modes
    int unsigned n;
    for (int i = 0; i < 8; i++) seq[i] = U_NOP;
    n = 0;
    valid_md = (md == MD_DIRECT) || (md == MD_REG_A) || (md == MD_REG_R) ||
               (md == MD_IND) || (md == MD_IMM);
    src = (md == MD_REG_A) ? U_A_OUT : (md == MD_REG_R) ? U_R_OUT : U_DRIN_OUT;

    unique case (op)
      OP_FETCH: begin
        if (md == 3'b000) begin
          seq[0] = U_RD_IP0; seq[1] = U_RD_IP1; seq[2] = U_DRIN_OUT | U_IR_LOAD;
          n = 3;
        end
      end
      OP_IN, OP_OUT: begin
        if (md == MD_DIRECT || md == MD_IND) begin
          if (md == MD_DIRECT) begin
            seq[0] = U_RD_IP0; seq[1] = U_RD_IP1; seq[2] = U_OR_DR; n = 3;
          end else begin
            seq[0] = U_OR_R; n = 1;
          end
          if (op == OP_IN) begin
            seq[n] = U_IN_OR0; seq[n+1] = U_IN_OR1;
            seq[n+2] = U_DRIN_OUT | U_PASS | U_A_LOAD; n = n + 3;
          end else begin
            seq[n] = U_WR_OR0 | U_A_OUT; seq[n+1] = U_WR_HOLD | U_IOW;
            seq[n+2] = U_WR_HOLD; n = n + 3;
          end
        end
      end
      OP_STA, OP_STR: begin
        if (md == MD_DIRECT || md == MD_IND) begin
          if (md == MD_DIRECT) begin
            seq[0] = U_RD_IP0; seq[1] = U_RD_IP1; seq[2] = U_OR_DR; n = 3;
          end else begin
            seq[0] = U_OR_R; n = 1;
          end
          seq[n]   = U_WR_OR0 | ((op == OP_STA) ? U_A_OUT : U_R_OUT);
          seq[n+1] = U_WR_HOLD | U_MEMW;
          seq[n+2] = U_WR_HOLD;
          n = n + 3;
        end
      end
      OP_JMP, OP_JNZ, OP_JZ: begin
        logic [31:0] c;
        logic        take;
        c = (op == OP_JMP) ? U_NOP : U_COND;
        // A3 is Z for conditional instructions
        take = (op == OP_JMP) || ((op == OP_JNZ) ? !a3 : a3);
        if (md == MD_DIRECT) begin
          if (take) begin
            seq[0] = U_RD_IP0 | c; seq[1] = U_RD_JP1 | c;
            seq[2] = U_DRIN_OUT | U_IP_LOAD | U_IP_INC | c; n = 3;
          end else begin
            seq[0] = U_IP_INC | c; n = 1;            // skip the address byte
          end
        end else if (md == MD_REG_R) begin
          seq[0] = take ? (U_R_OUT | U_IP_LOAD | c) : c; n = 1;
        end
      end
      OP_CMP, OP_ADD, OP_SUB, OP_OR, OP_LDA, OP_LDR, OP_INV, OP_DEC, OP_SHL: begin
        if (valid_md) begin
          // operand fetch
          if (md == MD_DIRECT) begin
            seq[0] = U_RD_IP0; seq[1] = U_RD_IP1; seq[2] = U_OR_DR;
            seq[3] = U_RD_OR0; seq[4] = U_RD_OR1; n = 5;
          end else if (md == MD_IND) begin
            seq[0] = U_OR_R; seq[1] = U_RD_OR0; seq[2] = U_RD_OR1; n = 3;
          end else if (md == MD_IMM) begin
            seq[0] = U_RD_IP0; seq[1] = U_RD_IP1; n = 2;
          end
          // operation
          unique case (op)
            OP_CMP: begin seq[n] = src | U_CMP | U_Z_LOAD;  n = n + 1; end
            OP_ADD: begin seq[n] = src | U_ADD | U_A_LOAD;  n = n + 1; end
            OP_SUB: begin seq[n] = src | U_SUB | U_A_LOAD;  n = n + 1; end
            OP_OR:  begin seq[n] = src | U_LOR | U_A_LOAD;  n = n + 1; end
            OP_LDA: begin
              seq[n] = (md == MD_REG_A) ? U_NOP : (src | U_PASS | U_A_LOAD); n = n + 1;
            end
            OP_LDR: begin
              seq[n] = (md == MD_REG_R) ? U_NOP : (src | U_R_LOAD); n = n + 1;
            end
            OP_INV: begin
              seq[n] = src | U_INV | U_A_LOAD; n = n + 1;
              if (md == MD_REG_R) begin seq[n] = U_A_OUT | U_R_LOAD; n = n + 1; end
            end
            default: begin // OP_DEC, OP_SHL operate on the accumulator
              logic [31:0] f;
              f = (op == OP_DEC) ? U_DEC : U_SHL;
              if (md == MD_REG_A) begin
                seq[n] = f | U_A_LOAD; n = n + 1;
              end else begin
                // A <- operand; ALU settles; A <- ALU(F)
                seq[n] = src | U_PASS | U_A_LOAD; seq[n+1] = f; seq[n+2] = f | U_A_LOAD;
                n = n + 3;
                if (md == MD_REG_R) begin seq[n] = U_A_OUT | U_R_LOAD; n = n + 1; end
              end
            end
          endcase
        end
      end
      default: ;
    endcase
    if (n == 0) begin
      n = 1;                        // undefined opcode: one-word no-operation
    end
    if (op != OP_FETCH || md != 3'b000) seq[n-1] = seq[n-1] | U_IR_RESET;
    return '{w: seq, n: 4'(n)};
  endfunction

  // Physical microword stored at control-store address a = {IR, A3, MIP}
  function automatic logic [31:0] p8_microword(input logic [CS_AW-1:0] a);
    p8_usub_t    sub;
    logic [31:0] w;
    sub = p8_sequence(a[11:7], a[6:4], a[3]);
    w = ({1'b0, a[2:0]} < sub.n) ? sub.w[a[2:0]] : (U_NOP | U_IR_RESET);
    // conditional instructions carry C27 in every word of both sub-blocks
    if ((a[11:7] == OP_JNZ || a[11:7] == OP_JZ) &&
        (a[6:4] == MD_DIRECT || a[6:4] == MD_REG_R)) w = w | U_COND;
    return w ^ CW_ACTIVE_LOW;
  endfunction

  // Number of microwords of the instruction with opcode `opcode` for a given Z
  function automatic int unsigned p8_exec_words(input logic [7:0] opcode, input logic z);
    p8_usub_t    sub;
    logic        a3;
    a3 = z && (opcode[7:3] == OP_JNZ || opcode[7:3] == OP_JZ);
    sub = p8_sequence(opcode[7:3], opcode[2:0], a3);
    // the instruction ends with the word that resets IR (FETCH: loads IR)
    for (int unsigned i = 0; i < 8; i++)
      if ((sub.w[i] & (U_IR_RESET | U_IR_LOAD)) != '0) return i + 1;
    return int'(sub.n);
  endfunction

  // The whole control-store image, word i = p8_microword(i)
  typedef logic [31:0] p8_rom_t [CS_DEPTH];

  function automatic p8_rom_t p8_rom_image();
    p8_rom_t rom;
    for (int i = 0; i < CS_DEPTH; i++) rom[i] = p8_microword(CS_AW'(i));
    return rom;
  endfunction

endpackage
