// rv_asm.svh: RV32IM instruction encoders and a reference instruction-set
// model, shared by the core testbenches. Included inside a testbench module.

function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                       input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
  return {f7, rs2, rs1, f3, rd, opc};
endfunction
function automatic logic [31:0] i_type(input int imm, input logic [4:0] rs1, input logic [2:0] f3,
                                       input logic [4:0] rd, input logic [6:0] opc);
  logic [11:0] i = imm[11:0];
  return {i, rs1, f3, rd, opc};
endfunction
function automatic logic [31:0] s_type(input int imm, input logic [4:0] rs2, input logic [4:0] rs1, input logic [2:0] f3);
  logic [11:0] i = imm[11:0];
  return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
endfunction
function automatic logic [31:0] b_type(input int imm, input logic [4:0] rs2, input logic [4:0] rs1, input logic [2:0] f3);
  logic [12:0] i = imm[12:0];
  return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
endfunction
function automatic logic [31:0] j_type(input int imm, input logic [4:0] rd);
  logic [20:0] i = imm[20:0];
  return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
endfunction

function automatic logic [31:0] ADDI(input logic [4:0] rd, input logic [4:0] rs1, input int imm);
  return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
endfunction
function automatic logic [31:0] ADD(input logic [4:0] rd, input logic [4:0] rs1, input logic [4:0] rs2);
  return r_type(7'd0, rs2, rs1, 3'b000, rd, 7'b0110011);
endfunction
function automatic logic [31:0] MUL(input logic [4:0] rd, input logic [4:0] rs1, input logic [4:0] rs2);
  return r_type(7'd1, rs2, rs1, 3'b000, rd, 7'b0110011);
endfunction
function automatic logic [31:0] LW(input logic [4:0] rd, input logic [4:0] rs1, input int imm);
  return i_type(imm, rs1, 3'b010, rd, 7'b0000011);
endfunction
function automatic logic [31:0] SW(input logic [4:0] rs2, input logic [4:0] rs1, input int imm);
  return s_type(imm, rs2, rs1, 3'b010);
endfunction
function automatic logic [31:0] HALT();
  return j_type(0, 5'd0);   // jal x0, 0: a loop on itself
endfunction

// Reference model: runs prog from PC 0 until it reaches HALT, recording every
// write to a non-zero register in order.
function automatic void iss_run(input logic [31:0] prog [$], input int max_steps,
                                ref logic [31:0] regs [32], ref logic [4:0] wr_rd [$],
                                ref logic [31:0] wr_val [$]);
  logic [31:0] dmem [int];
  logic [31:0] pc, ins, a, b, res, addr, w, imm_i, imm_s, imm_b, imm_u, imm_j;
  logic [63:0] p;
  logic [4:0]  rd;
  logic        wr;
  for (int i = 0; i < 32; i++) regs[i] = '0;
  wr_rd.delete();
  wr_val.delete();
  pc = 0;
  for (int step = 0; step < max_steps; step++) begin
    ins = (32'(pc[31:2]) < prog.size()) ? prog[pc[31:2]] : 32'h0;
    if (ins == HALT()) break;
    a = regs[ins[19:15]];
    b = regs[ins[24:20]];
    rd = ins[11:7];
    imm_i = {{20{ins[31]}}, ins[31:20]};
    imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    imm_b = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
    imm_u = {ins[31:12], 12'b0};
    imm_j = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
    wr = 1'b0;
    res = '0;
    case (ins[6:0])
      7'b0110011: begin
        wr = 1'b1;
        if (ins[31:25] == 7'd1) begin
          case (ins[14:12])
            3'd0: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); res = p[31:0]; end
            3'd1: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); res = p[63:32]; end
            3'd2: begin p = $signed({{32{a[31]}}, a}) * $signed({32'b0, b}); res = p[63:32]; end
            3'd3: begin p = {32'b0, a} * {32'b0, b}; res = p[63:32]; end
            3'd4: res = (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : $unsigned($signed(a) / $signed(b));
            3'd5: res = (b == 0) ? '1 : a / b;
            3'd6: res = (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? 0 : $unsigned($signed(a) % $signed(b));
            default: res = (b == 0) ? a : a % b;
          endcase
        end else begin
          case (ins[14:12])
            3'd0: res = ins[30] ? a - b : a + b;
            3'd1: res = a << b[4:0];
            3'd2: res = {31'b0, $signed(a) < $signed(b)};
            3'd3: res = {31'b0, a < b};
            3'd4: res = a ^ b;
            3'd5: res = ins[30] ? $unsigned($signed(a) >>> b[4:0]) : a >> b[4:0];
            3'd6: res = a | b;
            default: res = a & b;
          endcase
        end
        pc += 4;
      end
      7'b0010011: begin
        wr = 1'b1;
        case (ins[14:12])
          3'd0: res = a + imm_i;
          3'd1: res = a << ins[24:20];
          3'd2: res = {31'b0, $signed(a) < $signed(imm_i)};
          3'd3: res = {31'b0, a < imm_i};
          3'd4: res = a ^ imm_i;
          3'd5: res = ins[30] ? $unsigned($signed(a) >>> ins[24:20]) : a >> ins[24:20];
          3'd6: res = a | imm_i;
          default: res = a & imm_i;
        endcase
        pc += 4;
      end
      7'b0110111: begin wr = 1'b1; res = imm_u; pc += 4; end
      7'b0010111: begin wr = 1'b1; res = pc + imm_u; pc += 4; end
      7'b1101111: begin wr = 1'b1; res = pc + 4; pc += imm_j; end
      7'b1100111: begin wr = 1'b1; res = pc + 4; pc = (a + imm_i) & ~32'd1; end
      7'b1100011: begin
        logic t;
        case (ins[14:12])
          3'd0: t = (a == b);
          3'd1: t = (a != b);
          3'd4: t = $signed(a) < $signed(b);
          3'd5: t = $signed(a) >= $signed(b);
          3'd6: t = a < b;
          default: t = a >= b;
        endcase
        pc = t ? pc + imm_b : pc + 4;
      end
      7'b0000011: begin
        wr = 1'b1;
        addr = a + imm_i;
        w = dmem.exists(int'(addr[31:2])) ? dmem[int'(addr[31:2])] : 32'h0;
        case (ins[14:12])
          3'd0: res = {{24{w[8*addr[1:0]+7]}}, w[8*addr[1:0] +: 8]};
          3'd1: res = {{16{w[16*addr[1]+15]}}, w[16*addr[1] +: 16]};
          3'd4: res = {24'b0, w[8*addr[1:0] +: 8]};
          3'd5: res = {16'b0, w[16*addr[1] +: 16]};
          default: res = w;
        endcase
        pc += 4;
      end
      7'b0100011: begin
        addr = a + imm_s;
        w = dmem.exists(int'(addr[31:2])) ? dmem[int'(addr[31:2])] : 32'h0;
        case (ins[14:12])
          3'd0: w[8*addr[1:0] +: 8] = b[7:0];
          3'd1: w[16*addr[1] +: 16] = b[15:0];
          default: w = b;
        endcase
        dmem[int'(addr[31:2])] = w;
        pc += 4;
      end
      default: pc += 4;
    endcase
    if (wr && rd != 0) begin
      regs[rd] = res;
      wr_rd.push_back(rd);
      wr_val.push_back(res);
    end
  end
endfunction
