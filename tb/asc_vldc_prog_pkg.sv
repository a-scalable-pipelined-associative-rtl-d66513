// asc_vldc_prog_pkg - the exact-match string-matching program (VLDC
// algorithm) for the processor, plus a second phase that exercises the
// remaining array mechanisms. Used by the processor testbenches.
//
// Data layout
//   Parallel PE i, data memory:  [0] text$ (one character per PE)
//                                [1] counter$  [2] match$   (both start at 0)
//                                [3] avg of the neighbours' text$ (phase 2)
//                                [4] 1 if this PE holds the largest text$ (phase 2)
//                                [5] for a PE holding 'A': text$ of the nearest PE
//                                    to its left holding 'A', else 0 (phase 3)
//   Sequential PE data memory:   [0] patt_length, [1..L] patt_string
//                                [100] final patt_counter
// Algorithm: for j = L down to 1, the PEs whose text$ equals patt_string[j]
// and whose counter$ equals patt_counter (all previous characters matched)
// send counter$+1 to their left neighbour's counter$. Afterwards every PE
// with counter$ == L sends 1 to its right neighbour's match$, so match$
// flags the first character of each occurrence (PE 0 holds a sentinel).
// The processor has no forwarding, so a result is used no earlier than the
// third instruction after the one producing it; NOPs pad where needed.
package asc_vldc_prog_pkg;
  import asc_pkg::*;
  import asc_asm_pkg::*;

  localparam int LOOP_START = 6;
  localparam int LOOP_LEN   = 15;

  // Fills prog and returns the number of words.
  function automatic int build(ref word_t prog [256]);
    int n = 0;
    // prologue
    prog[n++] = s_ld(1, 0, 0);                        // SPE R1 = patt_length
    prog[n++] = s_ri(OP_MOV, 2, 0, 0);                // SPE R2 = patt_counter = 0
    prog[n++] = p(OP_LD, 1, 0, 0, DSW_COMP, 1'b0, 0); // PE R1 = text$
    prog[n++] = s_ri(OP_ADD, 3, 1, 0);                // SPE R3 = j = patt_length
    prog[n++] = p(OP_LD, 2, 0, 0, DSW_COMP, 1'b0, 1); // PE R2 = counter$
    prog[n++] = p(OP_LD, 3, 0, 0, DSW_COMP, 1'b0, 2); // PE R3 = match$
    // loop, LOOP_START
    prog[n++] = s_ld(4, 3, 0);                        // SPE R4 = patt_string[j]
    prog[n++] = p_i(OP_MOV, 4, 0, 0);                 // PE R4 = 0 (nothing to send)
    prog[n++] = nop();
    prog[n++] = p_s(OP_CEQ, 0, 1, 4);                 // search text$ == patt[j]
    prog[n++] = p_s(OP_CEQ, 0, 2, 2);                 //   and counter$ == patt_counter
    prog[n++] = p_i(OP_ADD, 4, 2, 1);                 // responders: R4 = counter$ + 1
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = p(OP_MOV, 5, 4, 0, DSW_LEFT, 1'b0, 0);// R4 to the left; R5 = from right
    prog[n++] = s_ri(OP_ADD, 2, 2, 1);                // patt_counter++
    prog[n++] = s_ri(OP_SUB, 3, 3, 1);                // j--
    prog[n++] = p_i(OP_CNE, 0, 5, 0);                 // PEs that received a count
    prog[n++] = p(OP_MOV, 2, 0, 5, DSW_COMP, 1'b0, 0);//   counter$ = received
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = s_br(OP_BNE, 3, 0, LOOP_START);       // while j != 0
    // final search: counter$ == patt_length flags the predecessor of a match
    prog[n++] = p_i(OP_MOV, 4, 0, 0);
    prog[n++] = nop();
    prog[n++] = nop();
    prog[n++] = p_s(OP_CEQ, 0, 2, 1);
    prog[n++] = p_i(OP_MOV, 4, 0, 1);
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = nop();
    prog[n++] = p(OP_MOV, 5, 0, 4, DSW_RIGHT, 1'b0, 0);// R4 to the right; R5 = from left
    prog[n++] = nop();
    prog[n++] = nop();
    prog[n++] = p_i(OP_CNE, 0, 5, 0);
    prog[n++] = p_i(OP_MOV, 3, 0, 1);                  // match$ = 1
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = s_st(2, 0, 100);                       // SPE mem[100] = patt_counter
    prog[n++] = p(OP_ST, 0, 0, 2, DSW_COMP, 1'b0, 1);  // counter$
    prog[n++] = p(OP_ST, 0, 0, 3, DSW_COMP, 1'b0, 2);  // match$
    // phase 2: neighbour average (Data Movement Both) and maximum search
    prog[n++] = p(OP_AVG, 6, 1, 1, DSW_BOTH, 1'b0, 0); // R6 = (left text$ + right text$) / 2
    prog[n++] = p_i(OP_MOV, 7, 0, 0);
    prog[n++] = p(OP_MAX, 0, 1, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = p_i(OP_MOV, 7, 0, 1);
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = p(OP_ST, 0, 0, 6, DSW_COMP, 1'b0, 3);
    prog[n++] = nop();
    prog[n++] = p(OP_ST, 0, 0, 7, DSW_COMP, 1'b0, 4);
    // phase 3: responders (text$ == 'A') receive the text$ of the previous
    // responder over the network; the PEs between them are bypassed
    prog[n++] = p_i(OP_CEQ, 0, 1, 8'h41);
    prog[n++] = p(OP_MOV, 8, 0, 1, DSW_RIGHT, 1'b0, 0);
    prog[n++] = nop();
    prog[n++] = nop();
    prog[n++] = p(OP_ST, 0, 0, 8, DSW_COMP, 1'b0, 5);
    prog[n++] = p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0);
    prog[n++] = halt();
    for (int i = n; i < 256; i++) prog[i] = nop();
    return n;
  endfunction

  // Instructions issued for a pattern of length L, and taken branches.
  function automatic int issued(int L, int n);
    return n + (L - 1) * LOOP_LEN;
  endfunction
endpackage
