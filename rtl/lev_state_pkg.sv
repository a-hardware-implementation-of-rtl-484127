// States of the Levinson micro-controller (see levinson.sv).
package lev_state_pkg;
  typedef enum logic [4:0] {
    S_IDLE,
    S_INIT,      // e = r[0], a = (1,0,..), x = 0, issue y[0]/r[0]
    S_INIT_DIV,  // wait x[0]
    S_A_MUL,     // loop A: prod = r[n-i]*a[i]
    S_A_SUB,     //         acc  = acc - prod
    S_A_DIV,     //         xi   = acc / e
    S_B_MUL,     // loop B: prod = a_old[n-j]*xi
    S_B_ADD,     //         a[j] = a_old[j] + prod
    S_E_SQR,     // e update: t = xi*xi
    S_E_SUB,     //           t = 1 - t
    S_E_MUL,     //           e = e*t
    S_C_MUL,     // loop C: prod = r[n-i]*x[i]
    S_C_SUB,     //         acc  = acc - prod
    S_C_DIV,     //         pm   = acc / e
    S_D_MUL,     // loop D: prod = a[n-i]*pm
    S_D_ADD,     //         x[i] = x[i] + prod
    S_DONE
  } lev_state_e;
endpackage
